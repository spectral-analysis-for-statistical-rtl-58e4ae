// bist_ctrl - test control unit for two runs of the spectral test set.
//
// The shared-counter compactors (SRC2, SRC5) need the test set twice: once
// with sub = 0 for the first Hadamard tone and once with sub = 1 for the
// second. On start the controller latches test_len and then, for each run:
//   INIT  (1 cycle)        clr = 1: compactors, pattern generator and
//                          circuit under test are put back in their
//                          all-zero initial state
//   RUN   (test_len cyc.)  en = 1: one test vector per cycle is applied and
//                          its response compacted
//   CHECK (1 cycle)        check = 1: the signatures of this run are final
//                          and can be compared
// after the second CHECK it enters DONE and holds done = 1 until the next
// start. The two runs and the sub signal are the document's; the state
// machine, its one-cycle INIT/CHECK states and the start/done handshake are
// choices of this design. A session takes 2 * (test_len + 2) cycles from
// the cycle after start to done.
//
// Interface: start is sampled in IDLE and DONE; sub is 0 during the first
// run and 1 during the second (INIT, RUN and CHECK of that run).
module bist_ctrl
  import src_pkg::*;
#(
  parameter int unsigned LEN_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [LEN_W-1:0] test_len,
  output logic             clr,
  output logic             en,
  output logic             sub,
  output logic             check,
  output logic             busy,
  output logic             done
);

  bist_state_e      state;
  logic [LEN_W-1:0] len_q;
  logic [LEN_W-1:0] vec_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      len_q   <= '0;
      vec_cnt <= '0;
      sub     <= 1'b0;
    end else begin
      unique case (state)
        ST_IDLE, ST_DONE: begin
          if (start) begin
            state <= ST_INIT;
            len_q <= test_len;
            sub   <= 1'b0;
          end
        end
        ST_INIT: begin
          vec_cnt <= '0;
          state   <= (len_q == '0) ? ST_CHECK : ST_RUN;
        end
        ST_RUN: begin
          vec_cnt <= vec_cnt + 1'b1;
          if (vec_cnt == len_q - 1'b1) state <= ST_CHECK;
        end
        ST_CHECK: begin
          if (!sub) begin
            sub   <= 1'b1;
            state <= ST_INIT;
          end else begin
            state <= ST_DONE;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign clr   = (state == ST_INIT);
  assign en    = (state == ST_RUN);
  assign check = (state == ST_CHECK);
  assign busy  = (state == ST_INIT) || (state == ST_RUN) || (state == ST_CHECK);
  assign done  = (state == ST_DONE);

endmodule
