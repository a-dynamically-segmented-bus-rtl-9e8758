// Self-checking testbench of dsb_pe_port (PE at position 5 of 16). Checks
// what the port drives as initiator for each operation and how it answers to
// random messages on its segment: receive on Write only at a section end,
// on Broadcast everywhere, read service at a section end with the PE's word
// on the return lines, never for its own message, nothing outside a
// transfer cycle; and that the read answer becomes the completion data.
module tb_dsb_pe_port;
  localparam int unsigned N = 16, POS = 5, ID_W = 8, DATA_W = 16;
  localparam int unsigned PW = $clog2(N);
  localparam int unsigned MSG_W = 2 + PW + ID_W + DATA_W;

  logic clk = 1'b0, rst_n = 1'b1;
  logic xfer, granted, sw_left, sw_right;
  logic [1:0] r_op;
  logic [PW-1:0] r_l, r_r;
  logic [ID_W-1:0] r_id;
  logic [DATA_W-1:0] r_data, ret_drv, ret_seg, rd_data, rx_data, cpl_data;
  logic [MSG_W-1:0] msg_drv, msg_seg;
  logic rd_req, rx_valid, cpl_valid;
  logic [ID_W-1:0] rd_id, rx_id;
  logic [1:0] rx_op;
  logic [PW-1:0] rx_src;
  int checks = 0, failures = 0;

  dsb_pe_port #(.N(N), .POS(POS), .ID_W(ID_W), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s got %0h exp %0h", what, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int op, src, id, data, rdd, end_;
      bit x, g;
      @(negedge clk);
      x = ($urandom % 8) != 0;
      g = ($urandom % 2) == 1;
      op = 1 + $urandom % 3;
      // a legal own request: POS at an end (write/read) or inside (broadcast)
      r_op = 2'(op);
      if (op == 3) begin r_l = PW'(POS - 2); r_r = PW'(POS + 3); end
      else if ($urandom % 2 == 1) begin r_l = PW'(POS); r_r = PW'(POS + 4); end
      else begin r_l = PW'(POS - 3); r_r = PW'(POS); end
      r_id = ID_W'($urandom); r_data = DATA_W'($urandom);
      xfer = x; granted = g;
      sw_left = ($urandom % 2) == 1; sw_right = ($urandom % 2) == 1;
      // what the segment carries: own message when granted, else another's
      if (x && g) begin
        src = POS;
        op  = int'(r_op); id = int'(r_id); data = (op == 2) ? 0 : int'(r_data);
      end else begin
        src = $urandom % N;
        op  = $urandom % 4; id = $urandom % 256; data = $urandom % 65536;
      end
      msg_seg = {2'(op), PW'(src), ID_W'(id), DATA_W'(data)};
      rdd = $urandom % 65536;
      rd_data = DATA_W'(rdd);
      ret_seg = DATA_W'($urandom);
      #1;
      end_ = (!sw_left || !sw_right) ? 1 : 0;
      // initiator side
      check("msg_drv", longint'(msg_drv),
            (x && g) ? longint'({r_op, PW'(POS), r_id, (r_op == 2'd2) ? DATA_W'(0) : r_data}) : 0);
      check("cpl_valid", cpl_valid, x && g);
      check("cpl_data", cpl_data, (x && g && r_op == 2'd2) ? longint'(ret_seg) : 0);
      // receiver side
      begin
        bit act, wr, rd, bc;
        act = x && (op != 0) && (src != POS);
        wr = act && op == 1 && end_ == 1;
        rd = act && op == 2 && end_ == 1;
        bc = act && op == 3;
        check("rx_valid", rx_valid, wr || bc);
        if (wr || bc) begin
          check("rx_src", rx_src, src);
          check("rx_id", rx_id, id);
          check("rx_data", rx_data, data);
          check("rx_op", rx_op, op);
        end
        check("rd_req", rd_req, rd);
        check("ret_drv", ret_drv, rd ? rdd : 0);
        if (rd) check("rd_id", rd_id, id);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
