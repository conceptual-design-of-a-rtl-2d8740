// asg_pkg: shared widths and constants of the arithmetic sequence generator.
//
// The generator evaluates a(i) = a1 + (i-1)*d for i = 1..n, M terms per clock,
// one term per arithmetic unit. The widths below are the ones printed on the
// block diagrams: 32-bit a1, d, i and n, a 64-bit product and 64-bit sequence
// elements, and a 32-bit groupOffset counter. PIPE_DEPTH is the number of
// register stages between the control unit and the arithmetic unit outputs
// (two in the offset block, one between the blocks, three in the sequence
// block). The Ethernet and UART figures come from the two system variants:
// a 320-bit client bus for 100 Gb/s Ethernet (five 64-bit lanes at 312.5 MHz)
// and a 115200 bps UART on a 100 MHz prototype with 20 units and a 1 Kb buffer
// behind each unit.
package asg_pkg;

  // Datapath widths
  localparam int unsigned A1_W      = 32;  // first term a1
  localparam int unsigned D_W       = 32;  // common difference d
  localparam int unsigned IDX_W     = 32;  // element index i
  localparam int unsigned ELEM_W    = 64;  // sequence element a(i)
  localparam int unsigned N_W       = 32;  // sequence length n
  localparam int unsigned OFFSET_W  = 32;  // groupOffset counter
  localparam int unsigned UNIT_ID_W = 16;  // hard-wired unit index N

  // Register stages from the control unit's groupOffset to a(i)
  localparam int unsigned OFFSET_STAGES   = 2;
  localparam int unsigned INTERBLK_STAGES = 1;
  localparam int unsigned SEQ_STAGES      = 3;
  localparam int unsigned PIPE_DEPTH = OFFSET_STAGES + INTERBLK_STAGES + SEQ_STAGES; // 6

  // Conceptual design: 100G Ethernet client bus
  localparam int unsigned ETH_BUS_W = 320;
  localparam int unsigned M_ETH     = ETH_BUS_W / ELEM_W;  // 5 units saturate the link

  // Prototype: 20 units, 1 Kb buffer per unit, UART at 115200 bps from 100 MHz
  localparam int unsigned M_PROTO       = 20;
  localparam int unsigned BUF_BITS      = 1024;
  localparam int unsigned BUF_DEPTH     = BUF_BITS / ELEM_W;  // 16 elements per unit
  localparam int unsigned CLK_HZ_PROTO  = 100_000_000;
  localparam int unsigned UART_BAUD     = 115_200;
  localparam int unsigned CLKS_PER_BIT  = CLK_HZ_PROTO / UART_BAUD;  // 868

endpackage
