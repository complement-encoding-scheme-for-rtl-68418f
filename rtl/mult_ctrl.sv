// mult_ctrl -- controller that streams a block of coefficients through the
// multiplier.
//
// On 'start' (accepted only when idle) it latches a base address and a word
// count, then issues one ROM read per cycle: cen_n low, addr = base, base+1,
// ... (wrapping at the ROM size), with 'issue' high in the same cycle so the
// multiplicand A is taken alongside.  Each issue is delayed by LAT cycles to
// give 'out_valid' (and 'out_last' on the final one), matching the datapath's
// pipeline.  'busy' covers the whole operation up to the last result; 'done'
// pulses with the last result.  A count of 0 finishes without any read.
// States: IDLE -> ISSUE -> DRAIN -> IDLE.  The published architecture says
// only that a finite state machine synchronises the data flow and the
// multiplier; this sequencing is this design's own.
module mult_ctrl #(
  parameter int AW  = 9,     // address width (ROM of 2^AW words)
  parameter int LAT = 2      // issue-to-result latency of the datapath
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base_addr,
  input  logic [AW:0]   count,      // words to process, 0 .. 2^AW
  output logic          cen_n,      // ROM chip enable, active low
  output logic [AW-1:0] addr,
  output logic          issue,      // a ROM read and an A sample happen now
  output logic          out_valid,
  output logic          out_last,
  output logic          busy,
  output logic          done
);

  typedef enum logic [1:0] {IDLE, ISSUE, DRAIN} state_e;

  state_e          state;
  logic [AW:0]     remaining;
  logic [LAT-1:0]  vpipe, lpipe;
  logic            last_issue;

  assign issue      = (state == ISSUE);
  assign cen_n      = ~issue;
  assign last_issue = issue && (remaining == 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      addr      <= '0;
      remaining <= '0;
      vpipe     <= '0;
      lpipe     <= '0;
    end else begin
      vpipe <= {vpipe[LAT-2:0], issue};
      lpipe <= {lpipe[LAT-2:0], last_issue};
      case (state)
        IDLE: if (start) begin
          addr      <= base_addr;
          remaining <= count;
          state     <= (count == 0) ? DRAIN : ISSUE;
        end
        ISSUE: begin
          addr      <= addr + 1'b1;
          remaining <= remaining - 1'b1;
          if (remaining == 1) state <= DRAIN;
        end
        DRAIN: if (lpipe[LAT-1] || vpipe == '0) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign out_valid = vpipe[LAT-1];
  assign out_last  = lpipe[LAT-1];
  assign busy      = (state != IDLE);
  assign done      = out_last;

  // A new start is ignored while busy; the read count never underflows.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   issue |-> remaining != 0);

  if (LAT < 2) begin : g_bad_lat
    initial $fatal(1, "mult_ctrl: LAT must be at least 2");
  end

endmodule
