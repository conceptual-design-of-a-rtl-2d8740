// tb_arithmetic_unit: self-checking test of arithmetic_unit (lane N = 4).
// Streams a new groupOffset every cycle with a1, d and n changed every few
// cycles, and checks six cycles later that the lane outputs
// a(N + groupOffset) = a1 + (N + groupOffset - 1) * d, valid only when
// N + groupOffset <= n. Also checks the six-cycle latency of the first term.
module tb_arithmetic_unit;
  localparam int unsigned UNIT_ID = 4;
  localparam int unsigned LAT = 6;
  localparam int unsigned NCYC = 500;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_i;
  logic [31:0] off_i, n_i, a1_i, d_i;
  logic valid_o, ovf_o;
  logic [63:0] a_o;
  int checks = 0, failures = 0;

  logic [63:0] exp_a [NCYC];
  logic        exp_v [NCYC];

  arithmetic_unit #(.UNIT_ID(UNIT_ID)) dut (
    .clk(clk), .rst_n(rst_n), .clear_i(1'b0), .valid_i(valid_i),
    .group_offset_i(off_i), .n_i(n_i), .a1_i(a1_i), .d_i(d_i),
    .valid_o(valid_o), .a_o(a_o), .overflow_o(ovf_o));

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned idx;
    valid_i = 1'b0; off_i = '0; n_i = '0; a1_i = '0; d_i = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC + LAT; c++) begin
      if (c < NCYC) begin
        // a1 and d stay constant for stretches longer than the pipeline
        if (c % 16 == 0) begin
          a1_i = $urandom;
          d_i  = (c % 32 == 0) ? 32'($urandom_range(0, 100)) : $urandom;
          n_i  = 32'($urandom_range(1, 4000));
        end
        valid_i = (c % 16 < 8) && ($urandom_range(0, 5) != 0);
        off_i   = 32'($urandom_range(0, 4100));
        idx = longint'(off_i) + UNIT_ID;
        exp_v[c] = valid_i && (idx <= longint'(n_i));
        exp_a[c] = 64'(a1_i) + 64'(idx - 1) * 64'(d_i);
      end else begin
        valid_i = 1'b0;
      end
      @(posedge clk);
      #1;
      if (c >= LAT - 1 && c - (LAT - 1) < NCYC) begin
        int k;
        k = c - (LAT - 1);
        checks++;
        if (valid_o !== exp_v[k]) begin
          failures++;
          $display("FAIL %0d valid %0b exp %0b", k, valid_o, exp_v[k]);
        end
        if (exp_v[k]) begin
          checks++;
          if (a_o !== exp_a[k]) begin
            failures++;
            $display("FAIL %0d a %0d exp %0d", k, a_o, exp_a[k]);
          end
        end
      end
      @(negedge clk);
    end
    checks++;
    if (ovf_o !== 1'b0) begin
      failures++;
      $display("FAIL overflow raised for in-range terms");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
