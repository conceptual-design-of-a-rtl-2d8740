// asg_proto: the buffered, UART-connected build of the generator, with 20
// arithmetic units clocked at 100 MHz.
//
// The core computes 20 terms per clock. Each lane writes its terms into its
// own 1 Kb output buffer (16 x 64 bits): the group of terms with offset k*M is
// written at address k of all buffers at once, the address arriving down the
// pipeline with the group. When the control unit raises done, the readout
// walks the buffers in sequence order and the UART sends each 64-bit term,
// least significant byte first, at 115200 bps. Because the link is so much
// slower than the lanes, nothing is sent until the whole sequence is done.
// The buffers hold M * DEPTH = 320 terms; later terms are computed but not
// stored or sent. Buffer sizes, unit count, clock and bit rate are the
// published ones; the readout order, the drop rule and the 8N1 framing are
// this design's choices.
//
// Interface: hold a1, d and n steady and raise activate to start; done rises
// when all terms are computed (and the buffers written); readout_busy is high
// while the UART is still sending. Dropping activate before done aborts.
module asg_proto #(
  parameter int unsigned M            = asg_pkg::M_PROTO,
  parameter int unsigned ELEM_W       = asg_pkg::ELEM_W,
  parameter int unsigned BUF_DEPTH    = asg_pkg::BUF_DEPTH,
  parameter int unsigned CLKS_PER_BIT = asg_pkg::CLKS_PER_BIT
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     activate_i,
  input  logic [asg_pkg::A1_W-1:0] a1_i,
  input  logic [asg_pkg::D_W-1:0]  d_i,
  input  logic [asg_pkg::N_W-1:0]  n_i,
  output logic                     done_o,
  output logic                     busy_o,
  output logic                     overflow_o,
  output logic                     readout_busy_o,
  output logic                     uart_txd_o
);

  localparam int unsigned ADDR_W = asg_pkg::OFFSET_W;
  localparam int unsigned LANE_W = (M > 1) ? $clog2(M) : 1;

  logic [M-1:0][ELEM_W-1:0] elem;
  logic [M-1:0]             lane_valid;
  logic [ADDR_W-1:0]        wr_addr;
  logic [asg_pkg::N_W-1:0]  n_q;

  logic [ADDR_W-1:0]        rd_addr;
  logic [LANE_W-1:0]        rd_lane;
  logic [M-1:0][ELEM_W-1:0] rd_data;
  logic [ELEM_W-1:0]        rd_sel;
  logic                     done_q;
  logic                     readout_start;

  logic [7:0] tx_data;
  logic       tx_valid, tx_ready;

  asg_core #(
    .M     (M),
    .ELEM_W(ELEM_W),
    .ADDR_W(ADDR_W)
  ) u_core (
    .clk         (clk),
    .rst_n       (rst_n),
    .activate_i  (activate_i),
    .a1_i        (a1_i),
    .d_i         (d_i),
    .n_i         (n_i),
    .elem_o      (elem),
    .lane_valid_o(lane_valid),
    .valid_o     (),
    .addr_o      (wr_addr),
    .n_o         (n_q),
    .done_o      (done_o),
    .busy_o      (busy_o),
    .overflow_o  (overflow_o)
  );

  for (genvar u = 0; u < M; u++) begin : g_buf
    output_buffer #(
      .WIDTH (ELEM_W),
      .DEPTH (BUF_DEPTH),
      .ADDR_W(ADDR_W)
    ) u_buf (
      .clk    (clk),
      .we_i   (lane_valid[u]),
      .waddr_i(wr_addr),
      .wdata_i(elem[u]),
      .raddr_i(rd_addr),
      .rdata_o(rd_data[u])
    );
  end

  assign rd_sel = rd_data[rd_lane];

  // Readout starts on the rising edge of done
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done_q <= 1'b0;
    else        done_q <= done_o;
  end
  assign readout_start = done_o && !done_q;

  uart_readout #(
    .M     (M),
    .DEPTH (BUF_DEPTH),
    .WIDTH (ELEM_W),
    .N_W   (asg_pkg::N_W),
    .ADDR_W(ADDR_W),
    .LANE_W(LANE_W)
  ) u_readout (
    .clk       (clk),
    .rst_n     (rst_n),
    .start_i   (readout_start),
    .n_i       (n_q),
    .rd_addr_o (rd_addr),
    .rd_lane_o (rd_lane),
    .rd_data_i (rd_sel),
    .tx_data_o (tx_data),
    .tx_valid_o(tx_valid),
    .tx_ready_i(tx_ready),
    .busy_o    (readout_busy_o)
  );

  uart_tx #(
    .CLKS_PER_BIT(CLKS_PER_BIT)
  ) u_uart (
    .clk    (clk),
    .rst_n  (rst_n),
    .data_i (tx_data),
    .valid_i(tx_valid),
    .ready_o(tx_ready),
    .tx_o   (uart_txd_o)
  );

endmodule
