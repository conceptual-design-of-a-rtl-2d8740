// arithmetic_unit: one lane of the generator. It computes the term of index
// i = UNIT_ID + groupOffset, a(i) = a1 + (i - 1) * d, once per clock.
//
// It chains an offset block (two register stages), one rank of pipeline
// registers for i, valid, a1 and d, and a sequence block (three stages), as on
// the combined arithmetic unit diagram. The inter-block registers line i up
// with a1 and d at the sequence block's inputs. Total latency from
// group_offset_i/valid_i to a_o/valid_o is six clock edges; the lane accepts a
// new groupOffset every cycle. a1 and d are expected to stay constant for the
// duration of a sequence, as they are only delayed by one stage here.
// UNIT_ID is the lane's hard-wired index N (1..M).
module arithmetic_unit #(
  parameter int unsigned IDX_W     = asg_pkg::IDX_W,
  parameter int unsigned A1_W      = asg_pkg::A1_W,
  parameter int unsigned D_W       = asg_pkg::D_W,
  parameter int unsigned ELEM_W    = asg_pkg::ELEM_W,
  parameter int unsigned N_W       = asg_pkg::N_W,
  parameter int unsigned OFFSET_W  = asg_pkg::OFFSET_W,
  parameter int unsigned UNIT_ID_W = asg_pkg::UNIT_ID_W,
  parameter int unsigned UNIT_ID   = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear_i,
  input  logic                valid_i,
  input  logic [OFFSET_W-1:0] group_offset_i,
  input  logic [N_W-1:0]      n_i,
  input  logic [A1_W-1:0]     a1_i,
  input  logic [D_W-1:0]      d_i,
  output logic                valid_o,
  output logic [ELEM_W-1:0]   a_o,
  output logic                overflow_o
);

  logic             ofs_valid;
  logic [IDX_W-1:0] ofs_i;

  // Inter-block pipeline registers
  logic             seq_valid;
  logic [IDX_W-1:0] seq_i;
  logic [A1_W-1:0]  seq_a1;
  logic [D_W-1:0]   seq_d;

  offset_block #(
    .OFFSET_W (OFFSET_W),
    .IDX_W    (IDX_W),
    .N_W      (N_W),
    .UNIT_ID_W(UNIT_ID_W),
    .UNIT_ID  (UNIT_ID)
  ) u_offset (
    .clk           (clk),
    .rst_n         (rst_n),
    .valid_i       (valid_i),
    .group_offset_i(group_offset_i),
    .n_i           (n_i),
    .valid_o       (ofs_valid),
    .i_o           (ofs_i)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq_valid <= 1'b0;
      seq_i     <= '0;
      seq_a1    <= '0;
      seq_d     <= '0;
    end else begin
      seq_valid <= ofs_valid;
      seq_i     <= ofs_i;
      seq_a1    <= a1_i;
      seq_d     <= d_i;
    end
  end

  sequence_block #(
    .IDX_W (IDX_W),
    .A1_W  (A1_W),
    .D_W   (D_W),
    .ELEM_W(ELEM_W)
  ) u_sequence (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear_i   (clear_i),
    .valid_i   (seq_valid),
    .i_i       (seq_i),
    .a1_i      (seq_a1),
    .d_i       (seq_d),
    .valid_o   (valid_o),
    .a_o       (a_o),
    .overflow_o(overflow_o)
  );

endmodule
