// tb_asg_workloads: runs the evaluation workload on the 20-lane prototype:
// a1 = 255, d = 10 and n = 10, 100, ..., 10^8. The UART bit time is shortened
// to 4 clocks so the readout stays short; everything else is at its default.
// For each length it checks every term leaving the core (through the core's
// lane outputs), the number of groups, the clock count from start to done
// (floor((n + 120) / 20) + 2) and the min(n, 320) terms that come back over
// the UART. It prints the compute time at 100 MHz for each length.
module tb_asg_workloads;
  localparam int unsigned CPB = 4;
  localparam int unsigned M = 20;
  localparam longint unsigned A1 = 255;
  localparam longint unsigned D = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic activate;
  logic [31:0] n;
  logic done, busy, ovf, rbusy, txd;
  logic [7:0] rx_byte;
  logic rx_strobe;
  int frame_errors;
  int checks = 0, failures = 0;
  longint unsigned term_errors = 0;

  asg_proto #(.CLKS_PER_BIT(CPB)) dut (
    .clk(clk), .rst_n(rst_n), .activate_i(activate), .a1_i(32'(A1)), .d_i(32'(D)),
    .n_i(n), .done_o(done), .busy_o(busy), .overflow_o(ovf),
    .readout_busy_o(rbusy), .uart_txd_o(txd));

  uart_rx_model #(.CPB(CPB)) host (.clk(clk), .rx(txd), .data_o(rx_byte),
    .strobe_o(rx_strobe), .frame_errors_o(frame_errors));

  always #5 clk = ~clk;

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(input longint unsigned len);
    longint unsigned t, groups, i, expect_terms, terms, nbytes;
    logic [63:0] word;
    n = 32'(len);
    activate = 1'b1;
    @(negedge clk);
    t = 0; groups = 0; terms = 0; nbytes = 0; word = '0;
    while (!done) begin
      if (dut.u_core.valid_o) begin
        for (int u = 0; u < M; u++) begin
          i = groups * M + longint'(u) + 1;
          if (dut.u_core.lane_valid_o[u] != (i <= len)) term_errors++;
          else if (dut.u_core.lane_valid_o[u] && dut.u_core.elem_o[u] != A1 + (i - 1) * D) term_errors++;
        end
        groups++;
      end
      @(negedge clk);
      t++;
    end
    check(groups == (len + M - 1) / M, $sformatf("n=%0d groups %0d", len, groups));
    check(t == (len + 6 * M) / M + 2, $sformatf("n=%0d done after %0d clocks", len, t));
    check(term_errors == 0, $sformatf("n=%0d all terms correct", len));
    check(!ovf, "no overflow");
    expect_terms = (len < 320) ? len : 320;
    while (terms < expect_terms) begin
      @(posedge clk);
      if (rx_strobe) begin
        word[8 * nbytes +: 8] = rx_byte;
        nbytes++;
        if (nbytes == 8) begin
          check(word == A1 + terms * D, $sformatf("n=%0d uart term %0d", len, terms + 1));
          terms++;
          nbytes = 0;
        end
      end
    end
    while (rbusy) @(negedge clk);
    check(frame_errors == 0, "uart frames");
    $display("n = %0d: done after %0d clocks (%0.3f us at 100 MHz), %0d terms returned",
             len, t, real'(t) / 100.0, terms);
    activate = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    activate = 1'b0; n = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (longint unsigned len = 10; len <= 100_000_000; len *= 10) run(len);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
