// Self-checking testbench of dsb_req_fifo against a queue model: random
// pushes and pops, order and data of every entry, the count, the full
// condition (push_ready low) and push-while-full-with-pop.
module tb_dsb_req_fifo;
  localparam int unsigned W = 20, DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push_valid = 1'b0, pop = 1'b0, push_ready, head_valid;
  logic [W-1:0] push_data = '0, head_data;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0, fulls = 0;
  logic [W-1:0] model[$];

  dsb_req_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 20000; t++) begin
      bit pu, po;
      #1;
      check("count", int'(count), model.size());
      check("head_valid", int'(head_valid), int'(model.size() != 0));
      if (model.size() != 0) check("head_data", int'(head_data), int'(model[0]));
      pu = ($urandom % 100) < ((t / 2000) % 2 == 1 ? 70 : 40);
      po = model.size() != 0 && ($urandom % 100) < ((t / 2000) % 2 == 1 ? 40 : 70);
      if (model.size() == DEPTH) fulls++;
      push_valid <= pu;
      push_data  <= W'($urandom);
      pop        <= po;
      #1;
      check("push_ready", int'(push_ready), int'(model.size() < DEPTH || po));
      @(posedge clk);
      if (po) void'(model.pop_front());
      if (pu && (model.size() < DEPTH)) model.push_back(push_data);
    end
    check("buffer became full", int'(fulls > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
