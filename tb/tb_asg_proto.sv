// tb_asg_proto: end-to-end test of the 20-unit buffered UART build, with the
// bit time shortened to 4 clocks. Runs the evaluation parameters (a1 = 255,
// d = 10) for n = 10, n = 100 and n = 400; the host-side receiver rebuilds each
// 64-bit term from eight bytes, least significant first, and compares it with
// a1 + (i-1)*d. n = 400 exceeds the 320 terms the buffers hold, so exactly
// 320 terms must arrive. Checks the cycle at which done rises, that the UART
// stays quiet until done, and that no frame is malformed.
module tb_asg_proto;
  localparam int unsigned CPB = 4;
  localparam int unsigned M = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  logic activate;
  logic [31:0] a1, d, n;
  logic done, busy, ovf, rbusy, txd;
  logic [7:0] rx_byte;
  logic rx_strobe;
  int frame_errors;
  int checks = 0, failures = 0;

  asg_proto #(.CLKS_PER_BIT(CPB)) dut (
    .clk(clk), .rst_n(rst_n), .activate_i(activate), .a1_i(a1), .d_i(d), .n_i(n),
    .done_o(done), .busy_o(busy), .overflow_o(ovf), .readout_busy_o(rbusy),
    .uart_txd_o(txd));

  uart_rx_model #(.CPB(CPB)) host (.clk(clk), .rx(txd), .data_o(rx_byte),
    .strobe_o(rx_strobe), .frame_errors_o(frame_errors));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  task automatic run(input int unsigned len);
    int unsigned t, terms, nbytes, expect_terms;
    logic [63:0] word;
    bit early_tx;
    a1 = 255; d = 10; n = len;
    activate = 1'b1;
    @(negedge clk);
    t = 0; early_tx = 0;
    while (!done) begin
      if (txd !== 1'b1) early_tx = 1;
      @(negedge clk);
      t++;
    end
    // done rises on the edge after the counter first exceeds n + 6M, which is
    // floor((n + 6M) / M) + 2 edges after the starting edge
    check(t == (len + 6 * M) / M + 2, $sformatf("n=%0d done after %0d cycles", len, t));
    check(!early_tx, "UART idle while computing");
    check(ovf == 1'b0, "no overflow");
    expect_terms = (len < 320) ? len : 320;
    terms = 0; nbytes = 0; word = '0;
    while (terms < expect_terms) begin
      @(posedge clk);
      if (rx_strobe) begin
        word[8 * nbytes +: 8] = rx_byte;
        nbytes++;
        if (nbytes == 8) begin
          check(word == 64'd255 + 64'(terms) * 64'd10,
                $sformatf("term %0d = %0d", terms + 1, word));
          terms++;
          nbytes = 0;
        end
      end
    end
    // Nothing more arrives
    while (rbusy) @(negedge clk);
    repeat (12 * CPB) @(negedge clk);
    check(txd == 1'b1 && nbytes == 0, "no bytes beyond the stored terms");
    check(frame_errors == 0, "well-formed frames");
    activate = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    activate = 1'b0; a1 = '0; d = '0; n = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(10);
    run(100);
    run(400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
