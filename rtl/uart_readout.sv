// uart_readout: empties the prototype's output buffers over the UART once the
// whole sequence has been computed.
//
// On start_i (the rising edge of the control unit's done flag) it sends
// min(n, M * DEPTH) terms in sequence order: term k (0-based) lives in lane
// k mod M at buffer address k div M. For each term it presents the address
// and lane, waits one cycle for the synchronous buffer read, then passes the
// eight bytes of the 64-bit value to the transmitter least significant byte
// first, as published. Sequence order and the limit to what the buffers hold
// are this design's choices. busy_o is high from start_i to the hand-over of
// the last byte.
//
// Read interface: rd_addr_o / rd_lane_o select a word, rd_data_i must return
// that lane's buffer output one clock edge after rd_addr_o changes (the
// buffers' registered read), and must stay valid while the address is held.
module uart_readout #(
  parameter int unsigned M      = asg_pkg::M_PROTO,
  parameter int unsigned DEPTH  = asg_pkg::BUF_DEPTH,
  parameter int unsigned WIDTH  = asg_pkg::ELEM_W,
  parameter int unsigned N_W    = asg_pkg::N_W,
  parameter int unsigned ADDR_W = asg_pkg::OFFSET_W,
  parameter int unsigned LANE_W = (M > 1) ? $clog2(M) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic [N_W-1:0]    n_i,
  output logic [ADDR_W-1:0] rd_addr_o,
  output logic [LANE_W-1:0] rd_lane_o,
  input  logic [WIDTH-1:0]  rd_data_i,
  output logic [7:0]        tx_data_o,
  output logic              tx_valid_o,
  input  logic              tx_ready_i,
  output logic              busy_o
);

  localparam int unsigned BYTES = WIDTH / 8;
  localparam int unsigned CNT_W = N_W + 1;
  localparam logic [CNT_W-1:0] CAPACITY = CNT_W'(M * DEPTH);

  typedef enum logic [1:0] {IDLE, READ, LOAD, SEND} state_e;

  state_e                       state;
  logic [CNT_W-1:0]             total;
  logic [CNT_W-1:0]             sent;
  logic [WIDTH-1:0]             shreg;
  logic [$clog2(BYTES+1)-1:0]   byte_idx;
  logic [CNT_W-1:0]             n_wide;

  assign n_wide = CNT_W'(n_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      total     <= '0;
      sent      <= '0;
      shreg     <= '0;
      byte_idx  <= '0;
      rd_addr_o <= '0;
      rd_lane_o <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          if (start_i) begin
            total     <= (n_wide < CAPACITY) ? n_wide : CAPACITY;
            sent      <= '0;
            rd_addr_o <= '0;
            rd_lane_o <= '0;
            if (n_wide != '0) state <= READ;
          end
        end
        READ: state <= LOAD;          // buffer registers the word
        LOAD: begin
          shreg    <= rd_data_i;
          byte_idx <= '0;
          state    <= SEND;
        end
        SEND: begin
          if (tx_ready_i) begin
            shreg    <= shreg >> 8;
            byte_idx <= byte_idx + 1'b1;
            if (byte_idx == ($bits(byte_idx))'(BYTES - 1)) begin
              sent <= sent + CNT_W'(1);
              if (rd_lane_o == LANE_W'(M - 1)) begin
                rd_lane_o <= '0;
                rd_addr_o <= rd_addr_o + ADDR_W'(1);
              end else begin
                rd_lane_o <= rd_lane_o + LANE_W'(1);
              end
              state <= (sent + CNT_W'(1) == total) ? IDLE : READ;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign tx_data_o  = shreg[7:0];
  assign tx_valid_o = (state == SEND);
  assign busy_o     = (state != IDLE);

  // A byte offered to the transmitter stays offered, unchanged, until taken
  a_tx_hold: assert property (@(posedge clk) disable iff (!rst_n)
    tx_valid_o && !tx_ready_i |=> tx_valid_o && $stable(tx_data_o));

endmodule
