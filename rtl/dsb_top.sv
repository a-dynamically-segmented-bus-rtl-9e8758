// One dynamically segmented bus (DS-Bus) with N processing-element ports.
//
// A single shared bus limits a multiprocessor to a few dozen PEs. The DS-Bus
// cuts the bus into N segments on a ring, one per PE, joined by N switches.
// Each bus cycle an arbiter picks a set of requests whose bus sections do
// not overlap and sets the switches so that each granted section becomes a
// bus of its own: many PE-to-PE transfers then run at the same time.
//
// Structure: per PE a request buffer (dsb_req_fifo) and a bus interface
// (dsb_pe_port); one distributed arbiter (dsb_arbiter: N arbiter modules and
// a control unit); a transfer stage; and the segmented bus (dsb_seg_bus),
// used twice: once for the message lines and once for the read-return lines.
//
// Operation is pipelined: while the granted requests of one arbitration
// phase are transferred, the arbiter already resolves the next phase.
//   cycle 0      arbiter samples the heads of all request buffers (start)
//   cycles 1..   resolution, one cycle per grant (see dsb_arbiter)
//   DONE cycle   granted heads are popped from their buffers and copied,
//                with the switch setting, into the transfer stage
//   next cycle   transfer: switches on, every granted PE's message moves
//                across its section (Write, Read or Broadcast), and the
//                arbiter starts the next phase on the new buffer heads.
// A phase with M grants therefore takes M+3 clock cycles, one of them
// overlapping the transfer of the previous phase.
//
// PE side, per PE i (arrays indexed by ring position):
//   req_*  : request handshake into the buffer; a request is {op, Left,
//            Right, data-ID, data}; Left..Right (counter-clockwise, may wrap)
//            is the section; Write/Read initiators sit at one end of it.
//   cpl_*  : one-cycle completion in the transfer cycle; read data for Read.
//   rx_*   : a Write or Broadcast message delivered to this PE.
//   rd_*   : this PE is the target of a Read: rd_id in, rd_data back in the
//            same cycle (combinational).
// Status: buffer occupancy, the phase result and the switch setting in use.
// The parameter defaults are 64 PEs per bus as in the large-system proposal
// and evaluation; data width (16, for 16-bit PEs), data-ID width, buffer depth
// and the one-cycle transfer are choices of this implementation.
module dsb_top #(
  parameter int unsigned N          = 64,
  parameter int unsigned ID_W       = 8,
  parameter int unsigned DATA_W     = 16,
  parameter int unsigned BUF_DEPTH  = 4,
  parameter int unsigned ROT_OFFSET = 0,
  localparam int unsigned PW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW    = $clog2(N + 1),
  localparam int unsigned BW    = (BUF_DEPTH > 1) ? $clog2(BUF_DEPTH) : 1,
  localparam int unsigned REQ_W = 2 + 2 * PW + ID_W + DATA_W,
  localparam int unsigned MSG_W = 2 + PW + ID_W + DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // request submission
  input  logic [N-1:0]             req_valid,
  output logic [N-1:0]             req_ready,
  input  logic [N-1:0][1:0]        req_op,
  input  logic [N-1:0][PW-1:0]     req_l,
  input  logic [N-1:0][PW-1:0]     req_r,
  input  logic [N-1:0][ID_W-1:0]   req_id,
  input  logic [N-1:0][DATA_W-1:0] req_data,
  // completion of the PE's own request
  output logic [N-1:0]             cpl_valid,
  output logic [N-1:0][DATA_W-1:0] cpl_data,
  // received Write / Broadcast messages
  output logic [N-1:0]             rx_valid,
  output logic [N-1:0][1:0]        rx_op,
  output logic [N-1:0][PW-1:0]     rx_src,
  output logic [N-1:0][ID_W-1:0]   rx_id,
  output logic [N-1:0][DATA_W-1:0] rx_data,
  // read service
  output logic [N-1:0]             rd_req,
  output logic [N-1:0][ID_W-1:0]   rd_id,
  input  logic [N-1:0][DATA_W-1:0] rd_data,
  // status
  output logic [N-1:0][BW:0]       buf_count,
  output logic                     phase_done,
  output logic [N-1:0]             phase_grant,
  output logic [CW-1:0]            phase_n_grants,
  output logic [PW-1:0]            rot_start,
  output logic                     xfer,
  output logic [N-1:0]             xfer_sw
);

  typedef struct packed {
    logic [1:0]        op;
    logic [PW-1:0]     l;
    logic [PW-1:0]     r;
    logic [ID_W-1:0]   id;
    logic [DATA_W-1:0] data;
  } req_t;

  // ---------------- request buffers ----------------
  req_t [N-1:0]  head;
  logic [N-1:0]  head_valid, pop;

  for (genvar i = 0; i < N; i++) begin : g_buf
    req_t in_req;
    assign in_req = '{op: req_op[i], l: req_l[i], r: req_r[i], id: req_id[i], data: req_data[i]};
    dsb_req_fifo #(.W(REQ_W), .DEPTH(BUF_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push_valid (req_valid[i]),
      .push_ready (req_ready[i]),
      .push_data  (in_req),
      .head_valid (head_valid[i]),
      .head_data  (head[i]),
      .pop        (pop[i]),
      .count      (buf_count[i])
    );
  end

  // ---------------- arbiter ----------------
  logic                 arb_busy, arb_done;
  logic [N-1:0]         arb_grant, arb_sw;
  logic [N-1:0][PW-1:0] head_l, head_r;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      head_l[i] = head[i].l;
      head_r[i] = head[i].r;
    end
  end

  dsb_arbiter #(.N(N), .ROT_OFFSET(ROT_OFFSET)) u_arb (
    .clk, .rst_n,
    .start     (!arb_busy),
    .req_valid (head_valid),
    .req_l     (head_l),
    .req_r     (head_r),
    .busy      (arb_busy),
    .done      (arb_done),
    .grant     (arb_grant),
    .sw_on     (arb_sw),
    .n_grants  (phase_n_grants),
    .rot_start (rot_start)
  );

  assign pop            = arb_done ? arb_grant : '0;
  assign phase_done     = arb_done;
  assign phase_grant    = arb_done ? arb_grant : '0;

  // ---------------- transfer stage ----------------
  logic         x_valid_q;
  logic [N-1:0] x_grant_q, x_sw_q;
  req_t [N-1:0] x_req_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_valid_q <= 1'b0;
      x_grant_q <= '0;
      x_sw_q    <= '0;
    end else begin
      x_valid_q <= arb_done;
      if (arb_done) begin
        x_grant_q <= arb_grant;
        x_sw_q    <= arb_sw;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++)
      if (arb_done && arb_grant[i]) x_req_q[i] <= head[i];
  end

  assign xfer    = x_valid_q;
  assign xfer_sw = x_valid_q ? x_sw_q : '0;

  // ---------------- bus interfaces and segmented bus ----------------
  logic [N-1:0][MSG_W-1:0]  msg_drv, msg_seg;
  logic [N-1:0][DATA_W-1:0] ret_drv, ret_seg;

  for (genvar i = 0; i < N; i++) begin : g_port
    dsb_pe_port #(.N(N), .POS(i), .ID_W(ID_W), .DATA_W(DATA_W)) u_port (
      .clk, .rst_n,
      .xfer      (x_valid_q),
      .granted   (x_grant_q[i]),
      .r_op      (x_req_q[i].op),
      .r_l       (x_req_q[i].l),
      .r_r       (x_req_q[i].r),
      .r_id      (x_req_q[i].id),
      .r_data    (x_req_q[i].data),
      .sw_left   (xfer_sw[(i + N - 1) % N]),
      .sw_right  (xfer_sw[i]),
      .msg_drv   (msg_drv[i]),
      .msg_seg   (msg_seg[i]),
      .ret_drv   (ret_drv[i]),
      .ret_seg   (ret_seg[i]),
      .rd_req    (rd_req[i]),
      .rd_id     (rd_id[i]),
      .rd_data   (rd_data[i]),
      .rx_valid  (rx_valid[i]),
      .rx_op     (rx_op[i]),
      .rx_src    (rx_src[i]),
      .rx_id     (rx_id[i]),
      .rx_data   (rx_data[i]),
      .cpl_valid (cpl_valid[i]),
      .cpl_data  (cpl_data[i])
    );
  end

  dsb_seg_bus #(.N(N), .W(MSG_W)) u_msg_bus (
    .sw_on (xfer_sw), .drv (msg_drv), .seg (msg_seg));

  dsb_seg_bus #(.N(N), .W(DATA_W)) u_ret_bus (
    .sw_on (xfer_sw), .drv (ret_drv), .seg (ret_seg));

endmodule
