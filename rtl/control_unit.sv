// control_unit: sequences the computation of n terms in groups of M.
//
// A rising edge on activate_i starts a sequence: the 32-bit groupOffset
// counter is cleared, done_o falls and n is latched. On every following clock
// edge the counter steps by M, so the lanes see groupOffset = 0, M, 2M, ... and
// together compute i = 1..M, M+1..2M, and so on. Once the counter exceeds
// n + 6M the done flag is raised and the counter returns to zero; the 6M margin
// covers the six register stages between this unit and the lane outputs, so
// done rises only after the last term has left the lanes. These rules, and
// the start and step values, follow the published control unit description.
//
// valid_o is high while activate_i is high, done is low and groupOffset < n.
// The published rule keeps valid high until done; the added groupOffset < n
// term keeps the drain cycles from producing terms past the n-th. Dropping
// activate_i before done aborts the run (counter cleared, done left low); this
// and the start on a rising edge rather than on a level are this design's
// choices. n must not exceed 2^32 - 7M so that the counter does not wrap
// before the threshold.
//
// The unit also keeps the output-buffer address used by the prototype variant:
// it is cleared at start and advances by one with each group, so the M terms
// of group k are written to address k of every lane's buffer. start_o is a
// one-cycle pulse on the starting edge (used to clear the overflow flags).
module control_unit #(
  parameter int unsigned M        = asg_pkg::M_ETH,
  parameter int unsigned N_W      = asg_pkg::N_W,
  parameter int unsigned OFFSET_W = asg_pkg::OFFSET_W,
  parameter int unsigned ADDR_W   = asg_pkg::OFFSET_W,
  parameter int unsigned PIPE_DEPTH = asg_pkg::PIPE_DEPTH
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                activate_i,
  input  logic [N_W-1:0]      n_i,
  output logic                start_o,
  output logic                valid_o,
  output logic [OFFSET_W-1:0] group_offset_o,
  output logic [ADDR_W-1:0]   addr_o,
  output logic [N_W-1:0]      n_o,
  output logic                done_o,
  output logic                busy_o
);

  localparam int unsigned CMP_W = ((OFFSET_W > N_W) ? OFFSET_W : N_W) + 8;
  localparam logic [CMP_W-1:0] MARGIN = CMP_W'(PIPE_DEPTH * M);

  logic             activate_q;
  logic             running;
  logic [N_W-1:0]   n_q;
  logic             past_threshold;

  assign start_o = activate_i && !activate_q;

  // Comparator: offset > n + 6M
  assign past_threshold = CMP_W'(group_offset_o) > (CMP_W'(n_q) + MARGIN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      activate_q     <= 1'b0;
      running        <= 1'b0;
      done_o         <= 1'b0;
      group_offset_o <= '0;
      addr_o         <= '0;
      n_q            <= '0;
    end else begin
      activate_q <= activate_i;
      if (start_o) begin
        running        <= 1'b1;
        done_o         <= 1'b0;
        group_offset_o <= '0;
        addr_o         <= '0;
        n_q            <= n_i;
      end else if (running && !activate_i) begin
        running        <= 1'b0;
        group_offset_o <= '0;
        addr_o         <= '0;
      end else if (running) begin
        if (past_threshold) begin
          running        <= 1'b0;
          done_o         <= 1'b1;
          group_offset_o <= '0;
          addr_o         <= '0;
        end else begin
          group_offset_o <= group_offset_o + OFFSET_W'(M);
          addr_o         <= addr_o + ADDR_W'(1);
        end
      end
    end
  end

  assign valid_o = running && activate_i && !done_o && (CMP_W'(group_offset_o) < CMP_W'(n_q));
  assign n_o     = n_q;
  assign busy_o  = running;

  // No groupOffset is issued once done has been raised
  a_no_valid_when_done: assert property (@(posedge clk) disable iff (!rst_n)
    !(valid_o && done_o));

endmodule
