// tb_sequence_block: self-checking test of sequence_block.
// Two instances: one at the default widths (64-bit result) and one with a
// 40-bit result so that the multiplier and adder overflow cases can occur.
// Random i, a1, d are streamed one per cycle; each output is compared three
// cycles later with a1 + (i-1)*d worked out in 128-bit arithmetic. The sticky
// overflow flag is checked against a model that sets it after the first valid
// overflowing term and clears it on clear_i.
module tb_sequence_block;
  localparam int unsigned LAT = 3;
  localparam int unsigned NCYC = 600;
  localparam int unsigned NW = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, valid_i;
  logic [31:0] i_i, a1_i, d_i;
  logic valid_o, valid_n;
  logic [63:0] a_o;
  logic [NW-1:0] a_n;
  logic ovf_o, ovf_n;
  int checks = 0, failures = 0;
  int ovf_events = 0;

  logic [127:0] exp_a [NCYC];
  logic         exp_v [NCYC];
  logic         exp_clr [NCYC];
  logic         stim_v [NCYC];
  logic [31:0]  stim_i [NCYC], stim_a1 [NCYC], stim_d [NCYC];
  logic         model_ovf, model_ovf_n;

  sequence_block dut (
    .clk(clk), .rst_n(rst_n), .clear_i(clear), .valid_i(valid_i), .i_i(i_i),
    .a1_i(a1_i), .d_i(d_i), .valid_o(valid_o), .a_o(a_o), .overflow_o(ovf_o));

  sequence_block #(.ELEM_W(NW)) dut_narrow (
    .clk(clk), .rst_n(rst_n), .clear_i(clear), .valid_i(valid_i), .i_i(i_i),
    .a1_i(a1_i), .d_i(d_i), .valid_o(valid_n), .a_o(a_n), .overflow_o(ovf_n));

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] im1;
    clear = 1'b0; valid_i = 1'b0; i_i = '0; a1_i = '0; d_i = '0;
    model_ovf = 1'b0; model_ovf_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Stimulus is drawn up front so the flag model can look one cycle ahead
    for (int c = 0; c < NCYC; c++) begin
      stim_v[c]   = ($urandom_range(0, 4) != 0);
      exp_clr[c]  = ($urandom_range(0, 60) == 0);
      case ($urandom_range(0, 5))
        0: stim_i[c] = 32'd0;
        1: stim_i[c] = 32'd1;
        2: stim_i[c] = 32'hFFFF_FFFF;
        default: stim_i[c] = $urandom;
      endcase
      stim_a1[c] = ($urandom_range(0, 2) == 0) ? 32'hFFFF_FFFF : $urandom;
      stim_d[c]  = ($urandom_range(0, 2) == 0) ? 32'($urandom_range(0, 20)) : $urandom;
      // a(i) = a1 + (i-1)*d; i = 0 is a borrow, marked by an all-ones value
      im1 = 128'(stim_i[c]) - 128'd1;
      exp_a[c] = (stim_i[c] == 0) ? '1 : 128'(stim_a1[c]) + im1 * 128'(stim_d[c]);
      exp_v[c] = stim_v[c];
    end
    for (int c = 0; c < NCYC + LAT; c++) begin
      if (c < NCYC) begin
        valid_i = stim_v[c];
        clear   = exp_clr[c];
        i_i     = stim_i[c];
        a1_i    = stim_a1[c];
        d_i     = stim_d[c];
      end else begin
        valid_i = 1'b0;
        clear   = 1'b0;
      end
      @(posedge clk);
      #1;
      if (c >= LAT - 1 && c - (LAT - 1) < NCYC) begin
        int k;
        logic [127:0] e;
        k = c - (LAT - 1);
        e = exp_a[k];
        checks += 2;
        if (valid_o !== exp_v[k] || valid_n !== exp_v[k]) begin
          failures++;
          $display("FAIL %0d valid %0b/%0b exp %0b", k, valid_o, valid_n, exp_v[k]);
        end
        if (exp_v[k] && (e >> 64) == 0) begin
          checks++;
          if (a_o !== e[63:0]) begin
            failures++;
            $display("FAIL %0d a %0h exp %0h", k, a_o, e[63:0]);
          end
        end
        if (exp_v[k] && (e >> NW) == 0) begin
          checks++;
          if (a_n !== e[NW-1:0]) begin
            failures++;
            $display("FAIL %0d narrow a %0h exp %0h", k, a_n, e[NW-1:0]);
          end
        end
        // Sticky flags: this cycle's output term sets them on the next edge
        @(negedge clk);
        checks += 2;
        if (ovf_o !== model_ovf || ovf_n !== model_ovf_n) begin
          failures++;
          $display("FAIL %0d overflow %0b/%0b exp %0b/%0b", k, ovf_o, ovf_n, model_ovf, model_ovf_n);
        end
        if (c + 1 < NCYC && exp_clr[c + 1]) begin
          model_ovf = 1'b0; model_ovf_n = 1'b0;
        end else begin
          if (exp_v[k] && (e >> 64) != 0) begin model_ovf = 1'b1; ovf_events++; end
          if (exp_v[k] && (e >> NW) != 0) model_ovf_n = 1'b1;
        end
      end else begin
        @(negedge clk);
        if (c + 1 < NCYC && exp_clr[c + 1]) begin
          model_ovf = 1'b0; model_ovf_n = 1'b0;
        end
      end
    end
    checks++;
    if (ovf_events == 0) begin
      failures++;
      $display("FAIL no subtractor overflow was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
