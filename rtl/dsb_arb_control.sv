// Central control unit of the distributed DS-Bus arbiter.
//
// Holds the rotation counter that implements criterion 1 (rotational
// policy: at the k-th arbitration phase the scan starts at PE (k + C) mod N)
// and sequences one resolution phase:
//   FIRST   : the first G goes to the first requesting module (C vector) at
//             or after the rotation start.
//   RESOLVE : the module granted in the previous cycle drives its L/R onto
//             the shared fields, the modules answer with their M signals and
//             the rotating priority logic (barrel shifter, priority encoder,
//             decoder, reverse barrel shifter) turns them into the next G
//             (criterion 2, priority policy). In the first RESOLVE cycle the
//             unit asserts latch_lb so that the left boundary is captured.
//             The phase ends in the first cycle with no M.
//   DONE    : one cycle; the G and S registers of the modules hold the
//             result, `done` is high and the rotation counter advances.
// Timing: `start` is taken in IDLE. A phase that grants M requests spends
// one FIRST cycle and M RESOLVE cycles, so `done` is high M+2 cycles after
// the `start` cycle (2 cycles when nothing is requested). Each grant after
// the first costs one clock, as in the architecture; the separate DONE
// cycle and the synchronous active-low reset are choices of this design.
module dsb_arb_control #(
  parameter int unsigned N         = 64,
  parameter int unsigned ROT_OFFSET = 0,   // the constant C of the rotation policy
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  c_vec,     // C registers of the modules
  input  logic [N-1:0]  m_vec,     // M signals of the modules
  output logic [N-1:0]  g_set,     // one-hot G to the chosen module
  output logic          latch_lb,
  output logic          busy,
  output logic          done,
  output logic [CW-1:0] n_grants,  // grants of the phase, valid with done
  output logic [PW-1:0] rot_start  // scan start of the current phase
);

  typedef enum logic [1:0] {S_IDLE, S_FIRST, S_RESOLVE, S_DONE} state_e;
  state_e        state_q;
  logic          first_q;
  logic [PW-1:0] cnt_q;
  logic [CW-1:0] ng_q;

  logic [N-1:0]  pri_req, pri_gnt;
  logic [PW-1:0] pri_idx;
  logic          pri_any;

  always_comb begin
    unique case (state_q)
      S_FIRST:   pri_req = c_vec;
      S_RESOLVE: pri_req = m_vec;
      default:   pri_req = '0;
    endcase
  end

  dsb_rot_priority #(.N(N)) u_pri (
    .req(pri_req), .start(cnt_q), .gnt(pri_gnt), .idx(pri_idx), .any(pri_any));

  assign g_set     = pri_gnt;
  assign latch_lb  = (state_q == S_RESOLVE) && first_q;
  assign busy      = (state_q != S_IDLE);
  assign done      = (state_q == S_DONE);
  assign n_grants  = ng_q;
  assign rot_start = cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      first_q <= 1'b0;
      cnt_q   <= PW'(ROT_OFFSET % N);
      ng_q    <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_FIRST;
          ng_q    <= '0;
        end
        S_FIRST: begin
          first_q <= 1'b1;
          if (pri_any) begin
            state_q <= S_RESOLVE;
            ng_q    <= ng_q + 1'b1;
          end else begin
            state_q <= S_DONE;
          end
        end
        S_RESOLVE: begin
          first_q <= 1'b0;
          if (pri_any) ng_q <= ng_q + 1'b1;
          else         state_q <= S_DONE;
        end
        S_DONE: begin
          state_q <= S_IDLE;
          cnt_q   <= (32'(cnt_q) == N - 1) ? '0 : cnt_q + 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // At most one G per cycle.
  a_onehot_g: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(g_set));
  // The encoded position and the decoded G agree.
  a_idx_g: assert property (@(posedge clk) disable iff (!rst_n) pri_any |-> g_set[pri_idx]);

endmodule
