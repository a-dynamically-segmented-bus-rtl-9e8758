// Self-checking testbench of dsb_seg_bus. Random switch settings, with one
// random driver (or none) per resulting section; every segment must show its
// section's driver value. Sections are found here by walking the ring from a
// switch that is off; the all-on and all-off settings are included.
module tb_dsb_seg_bus;
  localparam int unsigned N = 16;
  localparam int unsigned W = 12;

  logic [N-1:0] sw_on;
  logic [N-1:0][W-1:0] drv, seg;
  int checks = 0, failures = 0;

  dsb_seg_bus #(.N(N), .W(W)) dut (.sw_on, .drv, .seg);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sec[N];     // section number of each segment
    int nsec;
    logic [W-1:0] val[N];
    for (int t = 0; t < 4000; t++) begin
      sw_on = N'($urandom);
      if (t == 0) sw_on = '1;
      if (t == 1) sw_on = '0;
      // label sections: a new section starts after every switch that is off
      nsec = 0;
      if (sw_on == '1) begin
        for (int j = 0; j < N; j++) sec[j] = 0;
        nsec = 1;
      end else begin
        int j0;
        j0 = 0;
        while (sw_on[j0]) j0++;
        // segment j0+1 starts a section
        for (int k = 1; k <= N; k++) begin
          int j;
          j = (j0 + k) % N;
          sec[j] = nsec;
          if (!sw_on[j]) nsec++;
        end
      end
      // one driver per section, sometimes none
      drv = '0;
      for (int s = 0; s < nsec; s++) begin
        val[s] = '0;
        if ($urandom % 4 != 0) begin
          automatic int members[$];
          automatic int pick;
          for (int j = 0; j < N; j++) if (sec[j] == s) members.push_back(j);
          pick = members[$urandom % members.size()];
          val[s] = W'($urandom);
          drv[pick] = val[s];
        end
      end
      #1;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (seg[j] !== val[sec[j]]) begin
          failures++;
          if (failures < 10) $display("seg %0d got %h exp %h sw=%b", j, seg[j], val[sec[j]], sw_on);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
