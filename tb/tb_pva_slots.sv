// tb_pva_slots: the subsystem with every bank built from two memory slots
// (8 banks x 16-word blocks, address bit 31 selects the slot). Checks that
// line fills alternating between the two slots of one bank keep both rows
// open (no precharge after the first round, open-row latency), that a vector
// whose elements alternate between slots gathers correctly, and random
// gathers over the whole address space. Counts column commands that switch
// slot without a precharge, and fails if there are none.
module tb_pva_slots;
  import pva_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  pva_example_env #(.M(8), .N(16), .SLOTS(2)) env (.clk, .rst_n);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // column commands that go to a different slot than the bank's last command
  int switch_hits = 0;
  logic [1:0] last_cs [8];
  always @(posedge clk) begin
    for (int p = 0; p < 8; p++) begin
      if (env.sd_cmd[p] == SD_READ && last_cs[p] != 2'b00 && env.sd_cs[p] != last_cs[p])
        switch_hits++;
      if (env.sd_cmd[p] != SD_NOP) last_cs[p] <= env.sd_cs[p];
    end
  end

  initial begin
    int banks [LMAX];
    bit ok;
    int lat, pre0, lat_open;
    for (int p = 0; p < 8; p++) last_cs[p] = 2'b00;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // round 1 opens a row in each slot of bank 5
    env.gather(32'h0000_4050, 1, 16, banks, ok, lat);
    check(ok, "slot 0 line fill data");
    env.gather(32'h8000_4050, 1, 16, banks, ok, lat);
    check(ok, "slot 1 line fill data");
    foreach (banks[k]) check(banks[k] == 5, "slot 1 line fill bank");
    pre0 = env.n_pre[5];
    // round 2: both rows still open
    env.gather(32'h0000_4050, 1, 16, banks, ok, lat_open);
    check(ok, "slot 0 line fill data, round 2");
    env.gather(32'h8000_4050, 1, 16, banks, ok, lat);
    check(ok, "slot 1 line fill data, round 2");
    check(env.n_pre[5] == pre0, $sformatf("%0d precharges when switching slots", env.n_pre[5] - pre0));
    check(lat == lat_open && lat == 25, $sformatf("open-row fill latency %0d and %0d, want 25", lat_open, lat));
    // elements alternating between the slots
    env.gather(32'h0000_0010, 32'h8000_0010, 16, banks, ok, lat);
    check(ok, "slot-alternating vector data");
    for (int t = 0; t < 200; t++) begin
      addr_t b, s;
      b = $urandom;
      s = (t % 2 == 0) ? addr_t'($urandom % 4096) : $urandom;
      env.gather(b, s, 1 + $urandom % LMAX, banks, ok, lat);
      check(ok, $sformatf("random gather B=%h S=%h", b, s));
    end
    check(env.total_violations() == 0, "SDRAM protocol");
    check(switch_hits > 0, "no slot switch without precharge");
    $display("slot switches served without precharge: %0d", switch_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
