// mc_controller: the finite-state machine that sequences one mCrypton-64
// encryption in LATENCY = 30 clock cycles.
//
// A block starts when enable is high while the core is idle; enable is
// ignored while a block is in flight. Counting the edge that samples enable
// as cycle 0:
//   cycle 0        load plaintext into the state and the key into the key register
//   cycle 1        initial key addition with the user key
//   cycles 2..25   twelve rounds of two cycles each:
//                    key step  - the key schedule borrows the substitution unit
//                                and registers round key r
//                    data step - gamma, pi, tau and key addition on the state
//   cycles 26..28  output transformation: tau, then pi, then tau
//   cycle 29       ciphertext register loaded; done pulses high for one cycle
// With enable held high the next block loads in the cycle after done, so a new
// ciphertext appears every 30 cycles. The 30-cycle total and the single enable
// input follow the architecture described; the split of the cycles over the
// steps, the done flag and the reset are this design's choices.
// Interface: dp_op, ks_op, sub_key_sel and round_idx drive the datapath and
// the key schedule; busy is high from cycle 0 to cycle 29.
module mc_controller
  import mc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  output dp_op_t     dp_op,
  output ks_op_t     ks_op,
  output logic       sub_key_sel,
  output logic [3:0] round_idx,
  output logic       busy,
  output logic       done
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_KEY0,
    S_RKEY,
    S_RDATA,
    S_OUT_T1,
    S_OUT_P,
    S_OUT_T2,
    S_DONE
  } state_e;

  state_e st_q, st_d;
  logic [3:0] round_q, round_d;
  logic done_q;

  always_comb begin
    st_d        = st_q;
    round_d     = round_q;
    dp_op       = DP_HOLD;
    ks_op       = KS_HOLD;
    sub_key_sel = 1'b0;
    unique case (st_q)
      S_IDLE: if (enable) begin
        dp_op = DP_LOAD;
        ks_op = KS_LOAD;
        st_d  = S_KEY0;
      end
      S_KEY0: begin
        dp_op   = DP_KEY0;
        round_d = 4'd1;
        st_d    = S_RKEY;
      end
      S_RKEY: begin
        ks_op       = KS_STEP;
        sub_key_sel = 1'b1;
        st_d        = S_RDATA;
      end
      S_RDATA: begin
        dp_op = DP_ROUND;
        if (round_q == 4'(ROUNDS)) begin
          st_d = S_OUT_T1;
        end else begin
          round_d = round_q + 4'd1;
          st_d    = S_RKEY;
        end
      end
      S_OUT_T1: begin dp_op = DP_TRANS; st_d = S_OUT_P;  end
      S_OUT_P:  begin dp_op = DP_PERM;  st_d = S_OUT_T2; end
      S_OUT_T2: begin dp_op = DP_TRANS; st_d = S_DONE;   end
      S_DONE:   begin dp_op = DP_OUT;   st_d = S_IDLE;   end
      default:  st_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= S_IDLE;
      round_q <= '0;
      done_q  <= 1'b0;
    end else begin
      st_q    <= st_d;
      round_q <= round_d;
      done_q  <= (st_q == S_DONE);
    end
  end

  assign round_idx = round_q;
  assign busy      = (st_q != S_IDLE);
  assign done      = done_q;

endmodule
