// offset_block: turns the control unit's groupOffset into this unit's element
// index, i = N + groupOffset, where N is the unit's own index (1..M), wired in
// as the parameter UNIT_ID rather than fed as an input.
//
// Two register stages, as on the offset block diagram: stage 1 captures
// groupOffset, valid and n; the adder sits between the stages; stage 2 holds
// i and its valid. The adder output is IDX_W (32) bits, wrapping modulo 2^IDX_W.
//
// Own addition: the block also receives n and clears its output valid when
// i > n (or when N + groupOffset does not fit in IDX_W bits), so the last group
// of a sequence whose length is not a multiple of M does not emit terms past
// the n-th. With n a multiple of M this mask never acts.
//
// Timing: i_o/valid_o reflect group_offset_i/valid_i two clock edges earlier.
module offset_block #(
  parameter int unsigned OFFSET_W  = asg_pkg::OFFSET_W,
  parameter int unsigned IDX_W     = asg_pkg::IDX_W,
  parameter int unsigned N_W       = asg_pkg::N_W,
  parameter int unsigned UNIT_ID_W = asg_pkg::UNIT_ID_W,
  parameter int unsigned UNIT_ID   = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid_i,
  input  logic [OFFSET_W-1:0] group_offset_i,
  input  logic [N_W-1:0]      n_i,
  output logic                valid_o,
  output logic [IDX_W-1:0]    i_o
);

  localparam logic [UNIT_ID_W-1:0] UNIT_INDEX = UNIT_ID_W'(UNIT_ID);
  // Wide enough for the sum and for n without wrapping
  localparam int unsigned SUM_W = ((OFFSET_W > N_W) ? OFFSET_W : N_W) + 2;

  logic                valid_s1;
  logic [OFFSET_W-1:0] offset_s1;
  logic [N_W-1:0]      n_s1;

  logic [SUM_W-1:0] sum_wide;
  logic             in_range;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_s1  <= 1'b0;
      offset_s1 <= '0;
      n_s1      <= '0;
    end else begin
      valid_s1  <= valid_i;
      offset_s1 <= group_offset_i;
      n_s1      <= n_i;
    end
  end

  always_comb begin
    sum_wide = SUM_W'(offset_s1) + SUM_W'(UNIT_INDEX);
    in_range = (sum_wide <= SUM_W'(n_s1)) && (sum_wide < (SUM_W'(1) << IDX_W));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      i_o     <= '0;
    end else begin
      valid_o <= valid_s1 && in_range;
      i_o     <= IDX_W'(sum_wide);
    end
  end

endmodule
