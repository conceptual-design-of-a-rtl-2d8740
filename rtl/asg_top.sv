// asg_top: the arithmetic sequence generator in its two published builds,
// side by side, each with its own clock, reset and ports.
//
// 1. The Ethernet-attached accelerator (eth_* ports). Five arithmetic units
//    produce five 64-bit terms per clock, which form the 320-bit client bus of
//    a 100 Gb/s Ethernet MAC; at 312.5 MHz five units exactly fill the link,
//    so no buffering is needed. The MAC itself is vendor IP and is not part of
//    this RTL: eth_data_o/eth_lane_valid_o/eth_valid_o go to its transmit
//    client interface, and the sequence parameters a1, d, n and the activate
//    strobe are expected from its receive side. eth_data_o holds lane 1 (the
//    lowest index of the group) in bits 63:0, up to lane 5 in bits 319:256;
//    eth_lane_valid_o marks the lanes that carry terms (all five except in a
//    short last group). Framing of the Ethernet packets is left to the MAC
//    side and is not defined here.
//
// 2. The 20-unit prototype (proto_* ports) for a 100 MHz FPGA board, which
//    stores the terms in per-unit 1 Kb buffers and returns them over a
//    115200 bps UART once done (see asg_proto).
//
// Both accept a1, d (32 bits) and n (32 bits), compute a(i) = a1 + (i-1)*d
// for i = 1..n as 64-bit unsigned values, raise done when finished and keep a
// sticky overflow flag. Terms of group k appear six clock edges after the
// control unit issues it; one group leaves per clock.
module asg_top #(
  parameter int unsigned M_ETH              = asg_pkg::M_ETH,
  parameter int unsigned M_PROTO            = asg_pkg::M_PROTO,
  parameter int unsigned ELEM_W             = asg_pkg::ELEM_W,
  parameter int unsigned PROTO_BUF_DEPTH    = asg_pkg::BUF_DEPTH,
  parameter int unsigned PROTO_CLKS_PER_BIT = asg_pkg::CLKS_PER_BIT
) (
  // Ethernet-attached accelerator
  input  logic                        eth_clk,
  input  logic                        eth_rst_n,
  input  logic                        eth_activate_i,
  input  logic [asg_pkg::A1_W-1:0]    eth_a1_i,
  input  logic [asg_pkg::D_W-1:0]     eth_d_i,
  input  logic [asg_pkg::N_W-1:0]     eth_n_i,
  output logic [M_ETH*ELEM_W-1:0]     eth_data_o,
  output logic [M_ETH-1:0]            eth_lane_valid_o,
  output logic                        eth_valid_o,
  output logic                        eth_done_o,
  output logic                        eth_busy_o,
  output logic                        eth_overflow_o,
  // UART prototype
  input  logic                        proto_clk,
  input  logic                        proto_rst_n,
  input  logic                        proto_activate_i,
  input  logic [asg_pkg::A1_W-1:0]    proto_a1_i,
  input  logic [asg_pkg::D_W-1:0]     proto_d_i,
  input  logic [asg_pkg::N_W-1:0]     proto_n_i,
  output logic                        proto_done_o,
  output logic                        proto_busy_o,
  output logic                        proto_overflow_o,
  output logic                        proto_readout_busy_o,
  output logic                        proto_uart_txd_o
);

  logic [M_ETH-1:0][ELEM_W-1:0] eth_elem;
  logic [asg_pkg::OFFSET_W-1:0] eth_addr_unused;
  logic [asg_pkg::N_W-1:0]      eth_n_unused;

  asg_core #(
    .M     (M_ETH),
    .ELEM_W(ELEM_W)
  ) u_eth_core (
    .clk         (eth_clk),
    .rst_n       (eth_rst_n),
    .activate_i  (eth_activate_i),
    .a1_i        (eth_a1_i),
    .d_i         (eth_d_i),
    .n_i         (eth_n_i),
    .elem_o      (eth_elem),
    .lane_valid_o(eth_lane_valid_o),
    .valid_o     (eth_valid_o),
    .addr_o      (eth_addr_unused),
    .n_o         (eth_n_unused),
    .done_o      (eth_done_o),
    .busy_o      (eth_busy_o),
    .overflow_o  (eth_overflow_o)
  );

  // The lanes' outputs side by side form the MAC's client bus
  assign eth_data_o = eth_elem;

  asg_proto #(
    .M           (M_PROTO),
    .ELEM_W      (ELEM_W),
    .BUF_DEPTH   (PROTO_BUF_DEPTH),
    .CLKS_PER_BIT(PROTO_CLKS_PER_BIT)
  ) u_proto (
    .clk           (proto_clk),
    .rst_n         (proto_rst_n),
    .activate_i    (proto_activate_i),
    .a1_i          (proto_a1_i),
    .d_i           (proto_d_i),
    .n_i           (proto_n_i),
    .done_o        (proto_done_o),
    .busy_o        (proto_busy_o),
    .overflow_o    (proto_overflow_o),
    .readout_busy_o(proto_readout_busy_o),
    .uart_txd_o    (proto_uart_txd_o)
  );

endmodule
