// Transfer-phase logic of one PE on the DS-Bus (the PE's bus interface).
//
// During a transfer cycle (`xfer`) every PE whose request was granted puts
// its message on its own bus segment; the switches have joined the segments
// of each granted section, so the message reaches every PE of the section.
// The bus carries the control group (operation), the message group (data
// and data-ID) and, in this implementation, the initiator's position `src`
// so that PEs can tell where the message came from.
//   Write     : the initiator drives data; the PE at the other end of the
//               section (a section end is a PE whose left or right switch is
//               off) takes it.
//   Read      : the initiator drives the data-ID; the PE at the other end
//               answers on a second set of data lines (rd_req/rd_id ask its
//               PE for the word, rd_data must come back in the same cycle);
//               the initiator takes the answer as its completion data.
//   Broadcast : the initiator drives data; every other PE in the section
//               takes it.
// The initiator of a Write or Read must sit at one end of its section and a
// Broadcast initiator inside it (checked by assertions). Everything here is
// combinational; one transfer takes one cycle. Message layout, the `src`
// field and the separate return lines for Read are choices of this design.
module dsb_pe_port #(
  parameter int unsigned N      = 64,
  parameter int unsigned POS    = 0,
  parameter int unsigned ID_W   = 8,
  parameter int unsigned DATA_W = 16,
  localparam int unsigned PW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned MSG_W = 2 + PW + ID_W + DATA_W
) (
  input  logic              clk,      // clk and rst_n only for the assertions
  input  logic              rst_n,
  input  logic              xfer,     // transfer cycle
  // this PE's granted request
  input  logic              granted,
  input  logic [1:0]        r_op,
  input  logic [PW-1:0]     r_l,
  input  logic [PW-1:0]     r_r,
  input  logic [ID_W-1:0]   r_id,
  input  logic [DATA_W-1:0] r_data,
  // switch on each side of this segment in the current setting
  input  logic              sw_left,  // switch POS-1
  input  logic              sw_right, // switch POS
  // message lines: what this PE drives, what its segment carries
  output logic [MSG_W-1:0]  msg_drv,
  input  logic [MSG_W-1:0]  msg_seg,
  // read-return data lines
  output logic [DATA_W-1:0] ret_drv,
  input  logic [DATA_W-1:0] ret_seg,
  // to / from the PE
  output logic              rd_req,
  output logic [ID_W-1:0]   rd_id,
  input  logic [DATA_W-1:0] rd_data,
  output logic              rx_valid,
  output logic [1:0]        rx_op,
  output logic [PW-1:0]     rx_src,
  output logic [ID_W-1:0]   rx_id,
  output logic [DATA_W-1:0] rx_data,
  output logic              cpl_valid,
  output logic [DATA_W-1:0] cpl_data
);
  import dsb_pkg::*;

  typedef struct packed {
    dsb_op_e           op;
    logic [PW-1:0]     src;
    logic [ID_W-1:0]   id;
    logic [DATA_W-1:0] data;
  } msg_t;

  localparam logic [PW-1:0] ME = PW'(POS);

  msg_t own, seen;
  logic initiator, at_end, from_other, active;

  assign initiator = xfer && granted;

  always_comb begin
    own      = '0;
    own.op   = dsb_op_e'(r_op);
    own.src  = ME;
    own.id   = r_id;
    own.data = (dsb_op_e'(r_op) == OP_READ) ? '0 : r_data;
    msg_drv  = initiator ? own : '0;
  end

  assign seen       = msg_t'(msg_seg);
  assign at_end     = !sw_left || !sw_right;
  assign from_other = seen.src != ME;
  assign active     = xfer && (seen.op != OP_IDLE) && from_other;

  logic wr_target, rd_target, bc_target;
  assign wr_target = active && seen.op == OP_WRITE && at_end;
  assign rd_target = active && seen.op == OP_READ && at_end;
  assign bc_target = active && seen.op == OP_BROADCAST;

  assign rd_req   = rd_target;
  assign rd_id    = rd_target ? seen.id : '0;
  assign ret_drv  = rd_target ? rd_data : '0;

  assign rx_valid = wr_target || bc_target;
  assign rx_op    = rx_valid ? seen.op : OP_IDLE;
  assign rx_src   = rx_valid ? seen.src : '0;
  assign rx_id    = rx_valid ? seen.id : '0;
  assign rx_data  = rx_valid ? seen.data : '0;

  assign cpl_valid = initiator;
  assign cpl_data  = (initiator && dsb_op_e'(r_op) == OP_READ) ? ret_seg : '0;

  // Initiator placement rules.
  a_end_initiator: assert property (@(posedge clk) disable iff (!rst_n)
    initiator && dsb_op_e'(r_op) inside {OP_WRITE, OP_READ} |-> (r_l != r_r) && (r_l == ME || r_r == ME));
  a_bc_inside: assert property (@(posedge clk) disable iff (!rst_n)
    initiator && dsb_op_e'(r_op) == OP_BROADCAST |->
      ((ME >= r_l) ? (ME - r_l) : (ME + PW'(N) - r_l)) <= ((r_r >= r_l) ? (r_r - r_l) : (r_r + PW'(N) - r_l)));
  a_no_idle: assert property (@(posedge clk) disable iff (!rst_n) initiator |-> dsb_op_e'(r_op) != OP_IDLE);

endmodule
