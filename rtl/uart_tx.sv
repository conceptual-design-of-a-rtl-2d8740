// uart_tx: asynchronous serial transmitter used by the prototype to return the
// generated sequence to the host (over a UART-to-USB bridge) at 115200 bps.
//
// Frame: one start bit (0), eight data bits least significant first, one stop
// bit (1); the line idles high. Each bit lasts CLKS_PER_BIT clock cycles, by
// default 100 MHz / 115200 = 868 (0.006 % fast). The 8N1 framing and the
// valid/ready byte handshake are this design's choices; the bit rate is the
// published one.
//
// Handshake: a byte is taken on a clock edge where valid_i and ready_o are both
// high; ready_o then stays low for the 10 bit times of the frame. A frame
// therefore occupies 10 * CLKS_PER_BIT cycles and back-to-back bytes follow
// one another with one idle cycle between frames.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = asg_pkg::CLKS_PER_BIT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data_i,
  input  logic       valid_i,
  output logic       ready_o,
  output logic       tx_o
);

  localparam int unsigned CNT_W = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;

  logic             busy;
  logic [8:0]       frame;     // data bits then stop bit, LSB goes out next
  logic [3:0]       bits_left;
  logic [CNT_W-1:0] baud_cnt;

  assign ready_o = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      frame     <= '1;
      bits_left <= '0;
      baud_cnt  <= '0;
      tx_o      <= 1'b1;
    end else if (!busy) begin
      tx_o <= 1'b1;
      if (valid_i) begin
        busy      <= 1'b1;
        frame     <= {1'b1, data_i};
        bits_left <= 4'd10;
        baud_cnt  <= '0;
        tx_o      <= 1'b0;           // start bit goes out at once
      end
    end else begin
      if (baud_cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
        baud_cnt  <= '0;
        bits_left <= bits_left - 4'd1;
        frame     <= {1'b1, frame[8:1]};
        if (bits_left == 4'd1) begin
          busy <= 1'b0;
          tx_o <= 1'b1;
        end else begin
          tx_o <= frame[0];
        end
      end else begin
        baud_cnt <= baud_cnt + CNT_W'(1);
      end
    end
  end

endmodule
