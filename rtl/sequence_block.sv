// sequence_block: evaluates one term a(i) = a1 + (i - 1) * d of an unsigned
// arithmetic sequence.
//
// Three register stages, one after each operation, as on the sequence block
// diagram: (1) i - 1 is registered with a1, d and valid; (2) the product
// (i - 1) * d, 64 bits wide, is registered with a1 and valid; (3) the sum
// a1 + product is registered as a(i) with its valid. a(i) therefore appears
// three clock edges after i, a1, d and valid_i were presented, and a new term
// can enter on every cycle.
//
// Overflow: the subtractor borrows when i = 0, the product can exceed ELEM_W
// bits and the adder can carry out. Each condition travels down the pipeline
// with its term; on the clock edge after a valid term that overflowed leaves
// stage 3, the sticky overflow_o flag is set. It stays high until reset or until clear_i (pulsed by
// the control unit when a new sequence starts). With the default widths
// (32-bit i, d and a1, 64-bit result) neither the product nor the sum can
// overflow, so only the subtractor case remains; narrower ELEM_W makes the
// other two reachable. The widths are those printed on the diagram; the
// clear_i input and the per-term tracking of the flag are this design's choice.
module sequence_block #(
  parameter int unsigned IDX_W  = asg_pkg::IDX_W,
  parameter int unsigned A1_W   = asg_pkg::A1_W,
  parameter int unsigned D_W    = asg_pkg::D_W,
  parameter int unsigned ELEM_W = asg_pkg::ELEM_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear_i,
  input  logic              valid_i,
  input  logic [IDX_W-1:0]  i_i,
  input  logic [A1_W-1:0]   a1_i,
  input  logic [D_W-1:0]    d_i,
  output logic              valid_o,
  output logic [ELEM_W-1:0] a_o,
  output logic              overflow_o
);

  localparam int unsigned PROD_W = IDX_W + D_W;

  // Stage 1: subtractor
  logic              valid_s1, ovf_s1;
  logic [IDX_W-1:0]  im1_s1;
  logic [A1_W-1:0]   a1_s1;
  logic [D_W-1:0]    d_s1;
  // Stage 2: multiplier
  logic              valid_s2, ovf_s2;
  logic [ELEM_W-1:0] prod_s2;
  logic [A1_W-1:0]   a1_s2;
  // Stage 3: adder
  logic              ovf_s3;

  logic [PROD_W-1:0] prod_full;
  logic [ELEM_W:0]   sum_full;

  always_comb begin
    prod_full = PROD_W'(im1_s1) * PROD_W'(d_s1);
    sum_full  = {1'b0, prod_s2} + (ELEM_W + 1)'(a1_s2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_s1 <= 1'b0;
      ovf_s1   <= 1'b0;
      im1_s1   <= '0;
      a1_s1    <= '0;
      d_s1     <= '0;
      valid_s2 <= 1'b0;
      ovf_s2   <= 1'b0;
      prod_s2  <= '0;
      a1_s2    <= '0;
      valid_o  <= 1'b0;
      ovf_s3   <= 1'b0;
      a_o      <= '0;
    end else begin
      // i - 1; borrow when i is zero
      valid_s1 <= valid_i;
      ovf_s1   <= (i_i == '0);
      im1_s1   <= i_i - IDX_W'(1);
      a1_s1    <= a1_i;
      d_s1     <= d_i;
      // (i - 1) * d, kept to ELEM_W bits
      valid_s2 <= valid_s1;
      ovf_s2   <= ovf_s1 || ((prod_full >> ELEM_W) != '0);
      prod_s2  <= ELEM_W'(prod_full);
      a1_s2    <= a1_s1;
      // a1 + (i - 1) * d
      valid_o  <= valid_s2;
      ovf_s3   <= ovf_s2 || sum_full[ELEM_W];
      a_o      <= sum_full[ELEM_W-1:0];
    end
  end

  // Sticky overflow flag
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      overflow_o <= 1'b0;
    end else if (clear_i) begin
      overflow_o <= 1'b0;
    end else if (valid_o && ovf_s3) begin
      overflow_o <= 1'b1;
    end
  end

endmodule
