// uart_rx_model: simulation-only receiver standing in for the host side of the
// UART link. It waits for a falling edge on rx, samples the middle of the start
// bit, eight data bits (least significant first) and the stop bit, CPB clocks
// apart, and then pulses strobe_o for one clock with the byte on data_o.
// frame_errors_o counts frames whose start or stop bit was wrong.
module uart_rx_model #(
  parameter int unsigned CPB = 868
) (
  input  logic       clk,
  input  logic       rx,
  output logic [7:0] data_o,
  output logic       strobe_o,
  output int         frame_errors_o
);
  initial begin
    logic [7:0] b;
    strobe_o = 1'b0;
    data_o = '0;
    frame_errors_o = 0;
    forever begin
      @(negedge rx);
      repeat (CPB / 2) @(posedge clk);
      if (rx !== 1'b0) frame_errors_o++;
      for (int k = 0; k < 8; k++) begin
        repeat (CPB) @(posedge clk);
        b[k] = rx;
      end
      repeat (CPB) @(posedge clk);
      if (rx !== 1'b1) frame_errors_o++;
      data_o = b;
      strobe_o = 1'b1;
      @(posedge clk);
      strobe_o = 1'b0;
    end
  end
endmodule
