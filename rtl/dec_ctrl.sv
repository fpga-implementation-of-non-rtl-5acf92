// dec_ctrl: sequencing of one stochastic decoding run.
//
// States:
//   IDLE   waits for start.
//   LOAD   one cycle: the decision counters take the channel hard decisions
//          and the converters draw their first symbols.
//   INIT   EM_DEPTH cycles: the variable nodes copy channel symbols into
//          their edge memories (init high).
//   DECODE one decoding window of WINDOW cycles in which the nodes exchange
//          stochastic symbols; win_end marks its last cycle, when the
//          decision counters update the tentative decisions.
//   CHECK  one cycle with the nodes held: if the syndrome is zero the run
//          ends with success; after MAX_ITER windows it ends as a failure;
//          otherwise the next window starts.
//   DONE   done high with success and the number of windows used, until the
//          next start.
// One decoding window plays the part of one decoding iteration.
//
// Interface: start, syn_ok in; en, init, load, win_end, busy, done,
// success, iters out.
// Timing: a run takes 1 + EM_DEPTH + k*(WINDOW+1) cycles from start to done
// for k windows, plus one cycle into DONE.
//
// The stopping rule (stop when H x = 0, give up after a fixed maximum number
// of iterations) is the document's; the states, window length and limits are
// this design's choices.
module dec_ctrl #(
  parameter int unsigned EM_DEPTH = 32,
  parameter int unsigned WINDOW   = 64,
  parameter int unsigned MAX_ITER = 64,
  localparam int unsigned CW = $clog2(((EM_DEPTH > WINDOW) ? EM_DEPTH : WINDOW) + 1),
  localparam int unsigned IW = $clog2(MAX_ITER + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          syn_ok,
  output logic          en,
  output logic          init,
  output logic          load,
  output logic          win_end,
  output logic          busy,
  output logic          done,
  output logic          success,
  output logic [IW-1:0] iters
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_INIT, S_DECODE, S_CHECK, S_DONE} state_t;

  state_t        state;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      cnt     <= '0;
      iters   <= '0;
      success <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          state   <= S_LOAD;
          iters   <= '0;
          success <= 1'b0;
        end
        S_LOAD: begin
          state <= S_INIT;
          cnt   <= '0;
        end
        S_INIT: begin
          if (cnt == CW'(EM_DEPTH - 1)) begin
            state <= S_DECODE;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_DECODE: begin
          if (cnt == CW'(WINDOW - 1)) begin
            state <= S_CHECK;
            iters <= iters + 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        S_CHECK: begin
          cnt <= '0;
          if (syn_ok) begin
            state   <= S_DONE;
            success <= 1'b1;
          end else if (iters == IW'(MAX_ITER)) begin
            state   <= S_DONE;
          end else begin
            state   <= S_DECODE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign load    = (state == S_LOAD);
  assign init    = (state == S_LOAD) || (state == S_INIT);
  assign en      = (state == S_LOAD) || (state == S_INIT) || (state == S_DECODE);
  assign win_end = (state == S_DECODE) && (cnt == CW'(WINDOW - 1));
  assign busy    = (state != S_IDLE) && (state != S_DONE);
  assign done    = (state == S_DONE);

endmodule
