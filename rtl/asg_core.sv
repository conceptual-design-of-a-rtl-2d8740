// asg_core: the accelerator proper, a control unit driving M arithmetic units.
//
// The control unit broadcasts groupOffset, valid and n to all lanes; lane u
// (u = 1..M) has N = u wired in and computes a(u + groupOffset). a1 and d are
// common inputs and must stay constant while a sequence is generated. All M
// lanes present their terms in the same cycle, six clock edges after the
// control unit issued their groupOffset, so group k (terms kM+1..kM+M) leaves
// the core as one word elem_o = {a(kM+M), ..., a(kM+1)}, lane 1 in the low bits.
// lane_valid_o marks the lanes that hold terms of the sequence (all of them
// except in a short last group); valid_o is high when any lane is valid.
//
// The buffer address kept by the control unit travels down a six-stage delay
// line beside the lanes, so addr_o is the address at which the group on
// elem_o is to be stored (used by the buffered prototype). overflow_o is the
// OR of the lanes' sticky overflow flags; done_o is the control unit's flag.
// The lane arrangement and the address travelling with the control signals
// follow the published design; carrying the address in a separate delay line
// rather than inside each lane, and lane 1 in the low bits, are choices made
// here.
module asg_core #(
  parameter int unsigned M         = asg_pkg::M_ETH,
  parameter int unsigned IDX_W     = asg_pkg::IDX_W,
  parameter int unsigned A1_W      = asg_pkg::A1_W,
  parameter int unsigned D_W       = asg_pkg::D_W,
  parameter int unsigned ELEM_W    = asg_pkg::ELEM_W,
  parameter int unsigned N_W       = asg_pkg::N_W,
  parameter int unsigned OFFSET_W  = asg_pkg::OFFSET_W,
  parameter int unsigned ADDR_W    = asg_pkg::OFFSET_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       activate_i,
  input  logic [A1_W-1:0]            a1_i,
  input  logic [D_W-1:0]             d_i,
  input  logic [N_W-1:0]             n_i,
  output logic [M-1:0][ELEM_W-1:0]   elem_o,
  output logic [M-1:0]               lane_valid_o,
  output logic                       valid_o,
  output logic [ADDR_W-1:0]          addr_o,
  output logic [N_W-1:0]             n_o,
  output logic                       done_o,
  output logic                       busy_o,
  output logic                       overflow_o
);

  localparam int unsigned PIPE_DEPTH = asg_pkg::PIPE_DEPTH;

  logic                start;
  logic                cu_valid;
  logic [OFFSET_W-1:0] group_offset;
  logic [ADDR_W-1:0]   cu_addr;
  logic [N_W-1:0]      n_q;
  logic [M-1:0]        lane_overflow;

  logic [PIPE_DEPTH-1:0][ADDR_W-1:0] addr_pipe;

  control_unit #(
    .M         (M),
    .N_W       (N_W),
    .OFFSET_W  (OFFSET_W),
    .ADDR_W    (ADDR_W),
    .PIPE_DEPTH(PIPE_DEPTH)
  ) u_control (
    .clk           (clk),
    .rst_n         (rst_n),
    .activate_i    (activate_i),
    .n_i           (n_i),
    .start_o       (start),
    .valid_o       (cu_valid),
    .group_offset_o(group_offset),
    .addr_o        (cu_addr),
    .n_o           (n_q),
    .done_o        (done_o),
    .busy_o        (busy_o)
  );

  for (genvar u = 0; u < M; u++) begin : g_lane
    arithmetic_unit #(
      .IDX_W   (IDX_W),
      .A1_W    (A1_W),
      .D_W     (D_W),
      .ELEM_W  (ELEM_W),
      .N_W     (N_W),
      .OFFSET_W(OFFSET_W),
      .UNIT_ID (u + 1)
    ) u_au (
      .clk           (clk),
      .rst_n         (rst_n),
      .clear_i       (start),
      .valid_i       (cu_valid),
      .group_offset_i(group_offset),
      .n_i           (n_q),
      .a1_i          (a1_i),
      .d_i           (d_i),
      .valid_o       (lane_valid_o[u]),
      .a_o           (elem_o[u]),
      .overflow_o    (lane_overflow[u])
    );
  end

  // Control bus: the buffer address follows its group through the lanes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_pipe <= '0;
    end else begin
      addr_pipe[0] <= cu_addr;
      for (int s = 1; s < PIPE_DEPTH; s++) begin
        addr_pipe[s] <= addr_pipe[s-1];
      end
    end
  end

  assign addr_o     = addr_pipe[PIPE_DEPTH-1];
  assign valid_o    = |lane_valid_o;
  assign overflow_o = |lane_overflow;
  assign n_o        = n_q;

endmodule
