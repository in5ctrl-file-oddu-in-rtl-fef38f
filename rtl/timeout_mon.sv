// timeout_mon: start and end timeouts for one fiber input.
//
// After a Level-1 accept (l1a) the DMB must start sending its event within
// START_TMO clocks (CAL_START_TMO in calibration mode); once the event has
// started, it must end within END_TMO clocks. A counter runs in each waiting
// state; reaching the limit raises a one-clock timeout strobe and abandons the
// event. Accepts that arrive while an event is in progress are counted
// (up to 15) and served in turn. Both strobes are registered once more before
// they leave the block (one clock), as the design registers END_TIMEOUT and
// START_TIMEOUT into LEND_TIMEOUT and LSTART_TIMEOUT.
// The limits are the design's numbers: 128 clocks (3.2 us at 25 ns), 256 in
// calibration, and 18945 for the end. The l1a/start/end handshake and the
// queueing of accepts are choices of this implementation.
module timeout_mon #(
  parameter int unsigned START_TMO     = 128,
  parameter int unsigned CAL_START_TMO = 256,
  parameter int unsigned END_TMO       = 18945
) (
  input  logic clk,
  input  logic rst,
  input  logic l1a,          // Level-1 accept for this fiber
  input  logic cal_mode,     // calibration run: longer start timeout
  input  logic evt_start,    // first word of an event arrived
  input  logic evt_end,      // event trailer completed
  output logic busy,         // waiting for or receiving an event
  output logic start_timeout,
  output logic end_timeout
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_ACTIVE} state_t;

  state_t      state;
  logic [14:0] cnt;
  logic [3:0]  pend;         // accepts not yet served
  logic        stmo, etmo;   // unregistered strobes
  logic [14:0] start_lim;

  assign start_lim = cal_mode ? 15'(CAL_START_TMO) : 15'(START_TMO);
  assign stmo = (state == S_WAIT)   && !evt_start && (cnt == start_lim - 15'd1);
  assign etmo = (state == S_ACTIVE) && !evt_end   && (cnt == 15'(END_TMO - 1));
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= S_IDLE;
      cnt   <= '0;
      pend  <= '0;
      start_timeout <= 1'b0;
      end_timeout   <= 1'b0;
    end else begin
      start_timeout <= stmo;
      end_timeout   <= etmo;
      cnt <= cnt + 15'd1;
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (l1a || pend != 0) begin
            state <= S_WAIT;
            if (!l1a) pend <= pend - 4'd1;
          end
        end
        S_WAIT: begin
          if (l1a && pend != 4'hF) pend <= pend + 4'd1;
          if (evt_start) begin
            state <= S_ACTIVE;
            cnt   <= '0;
          end else if (stmo) begin
            state <= S_IDLE;
          end
        end
        S_ACTIVE: begin
          if (l1a && pend != 4'hF) pend <= pend + 4'd1;
          if (evt_end || etmo) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
