// output_buffer: the small memory placed behind each arithmetic unit in the
// UART prototype, 1 Kb as published, i.e. DEPTH = 1024 / 64 = 16 elements.
//
// One write port fed by the lane (write enable = lane valid, address from the
// control bus) and one read port used by the UART readout once the sequence is
// complete. The read is synchronous: rdata_o holds mem[raddr_i] one clock edge
// after raddr_i is presented. A write to an address at or beyond DEPTH is
// dropped, so a sequence longer than M * DEPTH keeps only its first M * DEPTH
// terms; the published description does not say what happens then, so that
// rule is this design's choice, as are the port timing and the registered
// read (which maps onto FPGA block or distributed RAM).
module output_buffer #(
  parameter int unsigned WIDTH  = asg_pkg::ELEM_W,
  parameter int unsigned DEPTH  = asg_pkg::BUF_DEPTH,
  parameter int unsigned ADDR_W = asg_pkg::OFFSET_W
) (
  input  logic              clk,
  input  logic              we_i,
  input  logic [ADDR_W-1:0] waddr_i,
  input  logic [WIDTH-1:0]  wdata_i,
  input  logic [ADDR_W-1:0] raddr_i,
  output logic [WIDTH-1:0]  rdata_o
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i && (waddr_i < ADDR_W'(DEPTH))) begin
      mem[IDX_W'(waddr_i)] <= wdata_i;
    end
  end

  always_ff @(posedge clk) begin
    if (raddr_i < ADDR_W'(DEPTH)) begin
      rdata_o <= mem[IDX_W'(raddr_i)];
    end else begin
      rdata_o <= '0;
    end
  end

endmodule
