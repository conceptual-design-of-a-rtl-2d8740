// tb_asg_core: self-checking test of asg_core.
// Instance A has M = 2 and runs the worked example (a1 = 0, d = 2, n = 4, which
// must give 0, 2 | 4, 6) and further random sequences; instance B has M = 5 and
// a 40-bit result so the sticky overflow flag can be driven and then cleared
// by the next start. For every group leaving a core the test checks the lane
// values against a1 + (i-1)*d, the lane-valid mask, the buffer address, that
// the first group appears six edges after the starting edge, that one group
// follows per cycle, and that done rises only after the last term.
module tb_asg_core;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  // Instance A: M = 2, default widths
  localparam int unsigned MA = 2;
  logic act_a;
  logic [31:0] a1_a, d_a, n_a;
  logic [MA-1:0][63:0] elem_a;
  logic [MA-1:0] lv_a;
  logic v_a, done_a, busy_a, ovf_a;
  logic [31:0] addr_a, no_a;

  asg_core #(.M(MA)) dut_a (
    .clk(clk), .rst_n(rst_n), .activate_i(act_a), .a1_i(a1_a), .d_i(d_a),
    .n_i(n_a), .elem_o(elem_a), .lane_valid_o(lv_a), .valid_o(v_a),
    .addr_o(addr_a), .n_o(no_a), .done_o(done_a), .busy_o(busy_a),
    .overflow_o(ovf_a));

  // Instance B: M = 5, 40-bit terms
  localparam int unsigned MB = 5;
  localparam int unsigned WB = 40;
  logic act_b;
  logic [31:0] a1_b, d_b, n_b;
  logic [MB-1:0][WB-1:0] elem_b;
  logic [MB-1:0] lv_b;
  logic v_b, done_b, busy_b, ovf_b;
  logic [31:0] addr_b, no_b;

  asg_core #(.M(MB), .ELEM_W(WB)) dut_b (
    .clk(clk), .rst_n(rst_n), .activate_i(act_b), .a1_i(a1_b), .d_i(d_b),
    .n_i(n_b), .elem_o(elem_b), .lane_valid_o(lv_b), .valid_o(v_b),
    .addr_o(addr_b), .n_o(no_b), .done_o(done_b), .busy_o(busy_b),
    .overflow_o(ovf_b));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // Runs one sequence on instance A and checks every group it produces
  task automatic run_a(input int unsigned a1, input int unsigned d, input int unsigned n,
                       input bit show);
    int unsigned g, t, first_t, last_t;
    longint unsigned i;
    a1_a = a1; d_a = d; n_a = n;
    act_a = 1'b1;
    @(negedge clk);   // starting edge has passed: t = 0
    g = 0; t = 0; first_t = 0; last_t = 0;
    while (!done_a && t < 5000) begin
      if (v_a) begin
        if (g == 0) first_t = t;
        check(t == first_t + g, "one group per cycle");
        check(addr_a == g, "buffer address follows the group");
        for (int u = 0; u < MA; u++) begin
          i = longint'(g) * MA + u + 1;
          check(lv_a[u] == (i <= n), $sformatf("lane %0d valid, i=%0d", u + 1, i));
          if (lv_a[u]) begin
            check(elem_a[u] == 64'(a1) + 64'(i - 1) * 64'(d),
                  $sformatf("a(%0d) = %0d", i, elem_a[u]));
            if (show) $display("  a(%0d) = %0d", i, elem_a[u]);
          end
        end
        g++;
        last_t = t;
      end
      @(negedge clk);
      t++;
    end
    check(done_a, "done raised");
    check(first_t == 6, "first group leaves six edges after the starting edge");
    check(g == (n + MA - 1) / MA, "number of groups");
    check(t > last_t, "done after the last group");
    check(ovf_a == 1'b0, "no overflow with 64-bit terms");
    act_a = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    int unsigned g;
    longint unsigned i;
    logic [127:0] full;
    bit saw_ovf;
    act_a = 0; a1_a = 0; d_a = 0; n_a = 0;
    act_b = 0; a1_b = 0; d_b = 0; n_b = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    $display("worked example, M = 2, a1 = 0, d = 2, n = 4:");
    run_a(0, 2, 4, 1'b1);
    run_a(255, 10, 20, 1'b0);
    for (int r = 0; r < 6; r++) begin
      run_a($urandom, $urandom_range(0, 1) ? $urandom : $urandom_range(0, 9),
            $urandom_range(1, 60), 1'b0);
    end

    // Instance B: a sequence that overflows 40 bits, then one that does not
    a1_b = 32'hFFFF_0000; d_b = 32'hF000_0000; n_b = 300;
    act_b = 1'b1;
    g = 0; saw_ovf = 0;
    @(negedge clk);
    while (!done_b) begin
      if (v_b) begin
        for (int u = 0; u < MB; u++) begin
          i = longint'(g) * MB + u + 1;
          full = 128'(a1_b) + 128'(i - 1) * 128'(d_b);
          if (lv_b[u] && (full >> WB) == 0) begin
            check(elem_b[u] == WB'(full), $sformatf("B a(%0d)", i));
          end
          if (lv_b[u] && (full >> WB) != 0) saw_ovf = 1;
        end
        g++;
      end
      @(negedge clk);
    end
    check(saw_ovf, "B sequence crosses 2^40");
    check(ovf_b == 1'b1, "B overflow flag set");
    act_b = 1'b0;
    repeat (3) @(negedge clk);
    check(ovf_b == 1'b1, "B overflow flag sticky");
    a1_b = 5; d_b = 3; n_b = 12;
    act_b = 1'b1;
    @(negedge clk);
    check(ovf_b == 1'b0, "B overflow flag cleared by new start");
    while (!done_b) @(negedge clk);
    check(ovf_b == 1'b0, "B no overflow in small sequence");
    act_b = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
