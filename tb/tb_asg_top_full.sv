// tb_asg_top_full: end-to-end test of asg_top with every parameter at its
// default: five 64-bit lanes on the Ethernet side, twenty lanes with 16-deep
// buffers and a 115200 bps UART (868 clocks per bit) on the prototype side.
//
// Ethernet side: the evaluation parameters a1 = 255, d = 10 for n = 10, 1000
// and 100003 (a short last group), then an aborted run; every bus word is
// checked lane by lane against a1 + (i-1)*d. Prototype side, in parallel:
// the same parameters for n = 10 and n = 100, every term decoded from the
// UART (eight bytes, least significant first) and checked. Overflow cannot
// occur at the default widths (32-bit operands, 64-bit terms) and is not
// exercised here. Each mechanism that can occur is counted and must occur.
module tb_asg_top_full;
  timeunit 1ns;
  timeprecision 100ps;

  localparam int unsigned ME = 5;
  localparam int unsigned MP = 20;
  localparam int unsigned W = 64;
  localparam int unsigned CPB = 868;

  logic eth_clk = 1'b0, proto_clk = 1'b0, rst_n = 1'b0;
  logic e_act;
  logic [31:0] e_a1, e_d, e_n;
  logic [ME*W-1:0] e_data;
  logic [ME-1:0] e_lv;
  logic e_valid, e_done, e_busy, e_ovf;
  logic p_act;
  logic [31:0] p_a1, p_d, p_n;
  logic p_done, p_busy, p_ovf, p_rbusy, p_txd;
  logic [7:0] rx_byte;
  logic rx_strobe;
  int frame_errors;
  int checks = 0, failures = 0;
  // Mechanism counters
  int n_full_groups = 0, n_short_groups = 0, n_overflow = 0;
  int n_abort = 0, n_eth_done = 0, n_proto_done = 0, n_uart_terms = 0;

  asg_top dut (
    .eth_clk(eth_clk), .eth_rst_n(rst_n), .eth_activate_i(e_act), .eth_a1_i(e_a1),
    .eth_d_i(e_d), .eth_n_i(e_n), .eth_data_o(e_data), .eth_lane_valid_o(e_lv),
    .eth_valid_o(e_valid), .eth_done_o(e_done), .eth_busy_o(e_busy),
    .eth_overflow_o(e_ovf),
    .proto_clk(proto_clk), .proto_rst_n(rst_n), .proto_activate_i(p_act),
    .proto_a1_i(p_a1), .proto_d_i(p_d), .proto_n_i(p_n), .proto_done_o(p_done),
    .proto_busy_o(p_busy), .proto_overflow_o(p_ovf),
    .proto_readout_busy_o(p_rbusy), .proto_uart_txd_o(p_txd));

  uart_rx_model #(.CPB(CPB)) host (.clk(proto_clk), .rx(p_txd), .data_o(rx_byte),
    .strobe_o(rx_strobe), .frame_errors_o(frame_errors));

  always #1.6 eth_clk = ~eth_clk;   // 312.5 MHz
  always #5   proto_clk = ~proto_clk; // 100 MHz

  initial begin
    repeat (12_000_000) @(posedge proto_clk);
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

  // One Ethernet-side sequence; returns whether any term overflowed
  task automatic eth_run(input int unsigned a1, input int unsigned d, input int unsigned n,
                         output bit overflowed);
    int unsigned g;
    longint unsigned i;
    logic [127:0] full;
    e_a1 = a1; e_d = d; e_n = n;
    e_act = 1'b1;
    g = 0; overflowed = 0;
    @(negedge eth_clk);
    while (!e_done) begin
      if (e_valid) begin
        if (&e_lv) n_full_groups++; else n_short_groups++;
        for (int u = 0; u < ME; u++) begin
          i = longint'(g) * ME + u + 1;
          check(e_lv[u] == (i <= n), $sformatf("eth lane %0d valid for i=%0d", u + 1, i));
          full = 128'(a1) + 128'(i - 1) * 128'(d);
          if (e_lv[u] && (full >> W) != 0) overflowed = 1;
          if (e_lv[u] && (full >> W) == 0)
            check(e_data[u*W +: W] == W'(full), $sformatf("eth a(%0d)", i));
        end
        g++;
      end
      @(negedge eth_clk);
    end
    n_eth_done++;
    check(g == (n + ME - 1) / ME, "eth group count");
    check(e_ovf == overflowed, "eth overflow flag");
    if (e_ovf) n_overflow++;
    e_act = 1'b0;
    @(negedge eth_clk);
  endtask

  task automatic proto_run(input int unsigned n);
    int unsigned terms, nbytes, expect_terms;
    logic [63:0] word;
    p_a1 = 255; p_d = 10; p_n = n;
    p_act = 1'b1;
    @(negedge proto_clk);
    while (!p_done) @(negedge proto_clk);
    n_proto_done++;
    expect_terms = (n < 320) ? n : 320;
    terms = 0; nbytes = 0; word = '0;
    while (terms < expect_terms) begin
      @(posedge proto_clk);
      if (rx_strobe) begin
        word[8 * nbytes +: 8] = rx_byte;
        nbytes++;
        if (nbytes == W / 8) begin
          check(word == 64'd255 + 64'(terms) * 64'd10, $sformatf("uart term %0d", terms + 1));
          terms++;
          n_uart_terms++;
          nbytes = 0;
        end
      end
    end
    while (p_rbusy) @(negedge proto_clk);
    repeat (12 * CPB) @(negedge proto_clk);
    check(nbytes == 0 && p_txd == 1'b1, "no bytes beyond the stored terms");
    check(frame_errors == 0, "uart frames");
    check(!p_ovf, "prototype overflow");
    p_act = 1'b0;
    @(negedge proto_clk);
  endtask

  initial begin
    bit ovf;
    e_act = 0; e_a1 = 0; e_d = 0; e_n = 0;
    p_act = 0; p_a1 = 0; p_d = 0; p_n = 0;
    repeat (3) @(negedge proto_clk);
    rst_n = 1'b1;
    repeat (2) @(negedge proto_clk);
    fork
      begin : eth_side
        eth_run(255, 10, 10, ovf);
        eth_run(255, 10, 1000, ovf);
        eth_run(255, 10, 100003, ovf);           // short last group
        // Abort: drop activate before done
        e_a1 = 0; e_d = 1; e_n = 10000;
        e_act = 1'b1;
        repeat (20) @(negedge eth_clk);
        e_act = 1'b0;
        @(negedge eth_clk);
        check(!e_busy && !e_done, "abort leaves done low");
        repeat (20) @(negedge eth_clk);
        check(!e_valid && !e_done, "no output after abort");
        n_abort++;
      end
      begin : proto_side
        proto_run(10);
        proto_run(100);
      end
    join
    $display("mechanisms: full groups %0d, short groups %0d, abort %0d, eth done %0d",
             n_full_groups, n_short_groups, n_abort, n_eth_done);
    $display("            proto done %0d, uart terms %0d", n_proto_done, n_uart_terms);
    check(n_full_groups > 0, "full groups seen");
    check(n_short_groups > 0, "short last group seen");
    check(n_abort > 0, "abort seen");
    check(n_eth_done > 0 && n_proto_done > 0, "done seen on both sides");
    check(n_uart_terms > 0, "uart readout seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
