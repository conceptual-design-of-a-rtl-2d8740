// tb_output_buffer: self-checking test of output_buffer (16 x 64 bits).
// Random writes, some to addresses beyond the depth which must be dropped,
// and random reads compared one cycle later with a reference array.
module tb_output_buffer;
  localparam int unsigned DEPTH = 16;
  logic clk = 1'b0;
  logic we;
  logic [31:0] waddr, raddr;
  logic [63:0] wdata, rdata;
  logic [63:0] model [DEPTH];
  logic [63:0] expect_q;
  int checks = 0, failures = 0;

  output_buffer dut (.clk(clk), .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
                     .raddr_i(raddr), .rdata_o(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    // Fill every word first so every read has a known value
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = a; wdata = {$urandom, $urandom};
      model[a] = wdata;
    end
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 1) != 0);
      waddr = ($urandom_range(0, 7) == 0) ? 32'(DEPTH + $urandom_range(0, 100)) : 32'($urandom_range(0, DEPTH - 1));
      wdata = {$urandom, $urandom};
      raddr = 32'($urandom_range(0, DEPTH - 1));
      // Read-before-write: a read of the word being written returns the old value
      expect_q = model[raddr];
      if (we && waddr < DEPTH) model[waddr] = wdata;
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        $display("FAIL read %0d got %0h exp %0h", raddr, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
