// tb_uart_tx: self-checking test of uart_tx at 8 clocks per bit.
// A receiver model samples the line in the middle of each bit and checks the
// start bit, the eight data bits (least significant first) and the stop bit
// of random bytes sent back to back and with gaps; it also checks that the
// line idles high and that each frame keeps ready low for ten bit times.
module tb_uart_tx;
  localparam int unsigned CPB = 8;
  localparam int unsigned NBYTES = 60;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] data;
  logic valid, ready, tx;
  logic [7:0] sent [$];
  int checks = 0, failures = 0;
  int received = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk(clk), .rst_n(rst_n), .data_i(data),
    .valid_i(valid), .ready_o(ready), .tx_o(tx));

  always #5 clk = ~clk;

  initial begin
    repeat (NBYTES * CPB * 14 + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sender
  initial begin
    int busy_cycles;
    data = '0; valid = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (tx !== 1'b1 || ready !== 1'b1) begin failures++; $display("FAIL idle line"); end
    for (int b = 0; b < NBYTES; b++) begin
      while (!ready) @(negedge clk);
      data = 8'($urandom);
      valid = 1'b1;
      sent.push_back(data);
      @(negedge clk);
      valid = 1'b0;
      busy_cycles = 0;
      while (!ready) begin busy_cycles++; @(negedge clk); end
      checks++;
      if (busy_cycles != 10 * CPB) begin
        failures++;
        $display("FAIL frame took %0d cycles", busy_cycles);
      end
      if ($urandom_range(0, 2) == 0) repeat ($urandom_range(1, 30)) @(negedge clk);
    end
  end

  // Receiver model
  initial begin
    logic [7:0] got, exp;
    @(posedge rst_n);
    forever begin
      @(negedge tx);
      repeat (CPB / 2) @(posedge clk);
      checks++;
      if (tx !== 1'b0) begin failures++; $display("FAIL start bit"); end
      for (int k = 0; k < 8; k++) begin
        repeat (CPB) @(posedge clk);
        got[k] = tx;
      end
      repeat (CPB) @(posedge clk);
      checks++;
      if (tx !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      exp = sent.pop_front();
      checks++;
      if (got !== exp) begin failures++; $display("FAIL byte %0h exp %0h", got, exp); end
      received++;
      if (received == NBYTES) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
