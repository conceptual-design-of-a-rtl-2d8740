// tb_control_unit: self-checking test of control_unit with M = 2 (the worked
// example: n = 4) and further lengths. After the starting edge the counter
// must read 0, M, 2M, ... each cycle, valid must be high exactly while the
// offset is below n, the buffer address must count groups, and done must rise
// on the edge after the offset first exceeds n + 6M, with the counter back at
// zero. Also checks the start pulse, that a held activate does not restart,
// and that dropping activate aborts a run without raising done.
module tb_control_unit;
  localparam int unsigned M = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic activate;
  logic [31:0] n_i;
  logic start, valid, done, busy;
  logic [31:0] offset, addr, n_o;
  int checks = 0, failures = 0;

  control_unit #(.M(M)) dut (
    .clk(clk), .rst_n(rst_n), .activate_i(activate), .n_i(n_i),
    .start_o(start), .valid_o(valid), .group_offset_o(offset), .addr_o(addr),
    .n_o(n_o), .done_o(done), .busy_o(busy));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (offset=%0d valid=%0b done=%0b addr=%0d)", what, offset, valid, done, addr);
    end
  endtask

  task automatic run(input int unsigned n);
    int unsigned t, valid_cycles, limit;
    n_i = n;
    activate = 1'b1;
    #1;
    check(start == 1'b1, "start pulse with activate rising");
    @(negedge clk);
    check(start == 1'b0, "start pulse lasts one cycle");
    check(done == 1'b0, "done low after start");
    check(n_o == n, "n latched");
    n_i = 32'hDEAD_BEEF;  // later changes of n must not matter
    limit = n + 6 * M;
    t = 0;
    valid_cycles = 0;
    // Counter steps by M until it exceeds n + 6M
    forever begin
      check(offset == t * M, $sformatf("offset at step %0d", t));
      check(addr == t, $sformatf("address at step %0d", t));
      check(valid == (t * M < n), $sformatf("valid at step %0d", t));
      check(done == 1'b0, "done low while counting");
      if (valid) valid_cycles++;
      if (t * M > limit) break;
      t++;
      @(negedge clk);
    end
    @(negedge clk);
    check(done == 1'b1, "done raised after offset > n + 6M");
    check(offset == 0, "counter reset at done");
    check(valid == 1'b0, "valid low once done");
    check(t == limit / M + 1, "cycles to done");
    check(valid_cycles == (n + M - 1) / M, "number of valid groups");
    repeat (3) @(negedge clk);
    check(done == 1'b1 && offset == 0 && !busy, "stays done while activate held");
    activate = 1'b0;
    @(negedge clk);
    check(done == 1'b1, "done held after activate falls");
  endtask

  initial begin
    activate = 1'b0; n_i = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(done == 1'b0 && valid == 1'b0 && !busy, "idle after reset");
    run(4);       // the worked example
    run(1);
    run(7);
    run(100);
    // Abort: drop activate in the middle of a run
    n_i = 200;
    activate = 1'b1;
    repeat (5) @(negedge clk);
    check(valid == 1'b1 && busy, "running before abort");
    activate = 1'b0;
    #1;
    check(valid == 1'b0, "valid drops with activate");
    @(negedge clk);
    check(!busy && done == 1'b0 && offset == 0, "abort stops the counter, done stays low");
    repeat (150) @(negedge clk);
    check(done == 1'b0, "no done after abort");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
