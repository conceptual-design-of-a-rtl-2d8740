// tb_offset_block: self-checking test of offset_block.
// Drives random groupOffset, valid and n values, one per cycle, and checks
// two cycles later that i = N + groupOffset and that valid is passed only for
// i <= n. Includes offsets that make N + groupOffset wrap past 32 bits.
module tb_offset_block;
  localparam int unsigned UNIT_ID = 3;
  localparam int unsigned LAT = 2;
  localparam int unsigned NCYC = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_i;
  logic [31:0] off_i, n_i;
  logic valid_o;
  logic [31:0] i_o;
  int checks = 0, failures = 0;

  logic [31:0] exp_i [NCYC + LAT];
  logic        exp_v [NCYC + LAT];

  offset_block #(.UNIT_ID(UNIT_ID)) dut (
    .clk(clk), .rst_n(rst_n), .valid_i(valid_i), .group_offset_i(off_i),
    .n_i(n_i), .valid_o(valid_o), .i_o(i_o));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned sum;
    valid_i = 1'b0; off_i = '0; n_i = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC + LAT; c++) begin
      if (c < NCYC) begin
        valid_i = ($urandom_range(0, 3) != 0);
        case ($urandom_range(0, 3))
          0: off_i = 32'($urandom_range(0, 100));
          1: off_i = $urandom;
          2: off_i = 32'hFFFF_FFFF - 32'($urandom_range(0, 5));
          default: off_i = 32'(20 * $urandom_range(0, 1000));
        endcase
        n_i = ($urandom_range(0, 1) != 0) ? off_i + 32'($urandom_range(0, 6)) : $urandom;
        sum = longint'(off_i) + UNIT_ID;
        exp_i[c] = 32'(sum);
        exp_v[c] = valid_i && (sum <= longint'(n_i)) && (sum < 64'h1_0000_0000);
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
          $display("FAIL cycle %0d valid %0b exp %0b", k, valid_o, exp_v[k]);
        end
        if (exp_v[k]) begin
          checks++;
          if (i_o !== exp_i[k]) begin
            failures++;
            $display("FAIL cycle %0d i %0d exp %0d", k, i_o, exp_i[k]);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
