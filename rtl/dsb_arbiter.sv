// Distributed DS-Bus arbiter: N arbiter modules, one per PE, and a central
// control unit, joined by the shared L/R fields.
//
// A resolution phase finds a set of non-overlapping bus sections among the
// pending requests and the switch setting that realises them:
//   1. the scan starts at the rotation position s (criterion 1, rotational);
//      the first requester met going counter-clockwise is granted and its
//      section becomes the granted bus section [LB, RB];
//   2. every cycle the module granted last puts its L and R on the fields;
//      every pending module tests whether its section fits in the free arc
//      from RB+1 to LB-1 (its M signal) and sets its switch bit if its ID lies
//      in [L, R-1] of the section on the fields;
//   3. the first M met from s (criterion 2, priority) is granted next and its
//      R becomes the new right boundary; the phase ends when no M is left.
// The L/R fields are modelled as a wired-OR of the module outputs (only the
// last granted module drives). Module i sits at ring position i.
// Interface: `start` (one cycle, while `busy` is low) samples req_valid,
// req_l and req_r; `done` is high for one cycle when grant[] (G registers)
// and sw_on[] (S registers: switch i joins segment i and i+1) hold the
// result, which stays until the next `start`.
// Timing: for M grants, done is high in the (M+2)-th cycle after the cycle
// in which start is taken (one cycle to pick the first grant, one per
// grant on the fields, one DONE cycle).
module dsb_arbiter #(
  parameter int unsigned N          = 64,
  parameter int unsigned ROT_OFFSET = 0,
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [N-1:0]          req_valid,
  input  logic [N-1:0][PW-1:0]  req_l,
  input  logic [N-1:0][PW-1:0]  req_r,
  output logic                  busy,
  output logic                  done,
  output logic [N-1:0]          grant,
  output logic [N-1:0]          sw_on,
  output logic [CW-1:0]         n_grants,
  output logic [PW-1:0]         rot_start
);

  logic [N-1:0]         c_vec, m_vec, g_set, drv_en;
  logic [N-1:0][PW-1:0] drv_l, drv_r;
  logic                 latch_lb, load;
  logic                 bus_valid;
  logic [PW-1:0]        bus_l, bus_r;

  assign load = start && !busy;

  // Shared L/R fields: wired-OR of the drivers.
  always_comb begin
    bus_valid = |drv_en;
    bus_l     = '0;
    bus_r     = '0;
    for (int i = 0; i < N; i++) begin
      bus_l |= drv_l[i];
      bus_r |= drv_r[i];
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_mod
    dsb_arb_module #(.N(N)) u_mod (
      .clk, .rst_n,
      .id_in    (PW'(i)),
      .load,
      .c_in     (req_valid[i]),
      .l_in     (req_l[i]),
      .r_in     (req_r[i]),
      .g_set    (g_set[i]),
      .latch_lb,
      .bus_valid,
      .bus_l,
      .bus_r,
      .drv_en   (drv_en[i]),
      .drv_l    (drv_l[i]),
      .drv_r    (drv_r[i]),
      .c_out    (c_vec[i]),
      .m_out    (m_vec[i]),
      .g_out    (grant[i]),
      .s_out    (sw_on[i])
    );
  end

  dsb_arb_control #(.N(N), .ROT_OFFSET(ROT_OFFSET)) u_ctrl (
    .clk, .rst_n,
    .start    (load),
    .c_vec,
    .m_vec,
    .g_set,
    .latch_lb,
    .busy,
    .done,
    .n_grants,
    .rot_start
  );

  // Only the module granted in the previous cycle drives the fields.
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(drv_en));

endmodule
