// tb_uart_readout: self-checking test of uart_readout with M = 3 lanes and
// buffers 4 deep. A buffer model answers reads one cycle late, as the real
// buffers do, and a transmitter model accepts bytes with random stalls. The
// byte stream must be the terms in sequence order, each least significant
// byte first, limited to the 12 terms the buffers hold.
module tb_uart_readout;
  localparam int unsigned M = 3;
  localparam int unsigned DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  logic [31:0] n;
  logic [31:0] rd_addr;
  logic [1:0] rd_lane;
  logic [63:0] rd_data;
  logic [7:0] tx_data;
  logic tx_valid, tx_ready, busy;
  logic [63:0] mem [M][DEPTH];
  int checks = 0, failures = 0;

  uart_readout #(.M(M), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .n_i(n), .rd_addr_o(rd_addr),
    .rd_lane_o(rd_lane), .rd_data_i(rd_data), .tx_data_o(tx_data),
    .tx_valid_o(tx_valid), .tx_ready_i(tx_ready), .busy_o(busy));

  always #5 clk = ~clk;

  // Buffers: registered read of the addressed lane
  always_ff @(posedge clk) rd_data <= (rd_addr < DEPTH) ? mem[rd_lane][rd_addr[1:0]] : '0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int unsigned len);
    int unsigned count, nbytes;
    logic [63:0] word;
    count = (len < M * DEPTH) ? len : M * DEPTH;
    for (int l = 0; l < M; l++)
      for (int a = 0; a < DEPTH; a++) mem[l][a] = {$urandom, $urandom};
    n = len;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    nbytes = 0;
    word = '0;
    while (busy) begin
      tx_ready = ($urandom_range(0, 3) == 0);
      #1;
      if (tx_valid && tx_ready) begin
        int k;
        k = nbytes / 8;
        word = mem[k % M][k / M];
        checks++;
        if (tx_data !== word[8 * (nbytes % 8) +: 8]) begin
          failures++;
          $display("FAIL term %0d byte %0d got %0h exp %0h", k, nbytes % 8, tx_data,
                   word[8 * (nbytes % 8) +: 8]);
        end
        nbytes++;
      end
      @(negedge clk);
    end
    tx_ready = 1'b0;
    checks++;
    if (nbytes != 8 * count) begin
      failures++;
      $display("FAIL n=%0d sent %0d bytes, exp %0d", len, nbytes, 8 * count);
    end
  endtask

  initial begin
    start = 1'b0; n = '0; tx_ready = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(5);
    run(1);
    run(12);
    run(20);   // more than the buffers hold
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
