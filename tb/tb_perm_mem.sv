// Self-checking testbench of perm_mem (S = 6 entries, 5-bit positions).
//
// Random trig pulses capture the current position and physical row; random
// probes and masked updates follow.  A reference copy of the registers
// predicts perm_op (one comparator per entry) and the read-out every clock.
// Captures, probe hits and updates must all occur.
module tb_perm_mem;
  localparam int S = 6, RW = 5, PW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pivot_en, upd_en;
  logic [S-1:0] trig, perm_op, upd_mask;
  logic [RW-1:0] cur_pos, cur_phys, probe, upd_val, rd_loc, rd_phys;
  logic [PW-1:0] rd_idx;
  perm_mem #(.S(S), .RW(RW)) dut (.*);

  logic [RW-1:0] ml [S], mp [S];
  int checks = 0, failures = 0, n_cap = 0, n_hit = 0, n_upd = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [S-1:0] eop;
    pivot_en = 0; upd_en = 0; trig = 0; upd_mask = 0;
    cur_pos = 0; cur_phys = 0; probe = 0; upd_val = 0; rd_idx = 0;
    for (int g = 0; g < S; g++) begin ml[g] = 0; mp[g] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      pivot_en = $urandom_range(0, 1);
      trig = S'(1) << $urandom_range(0, S);       // sometimes none
      cur_pos = RW'($urandom); cur_phys = RW'($urandom);
      probe = ($urandom_range(0, 1)) ? ml[$urandom_range(0, S-1)] : RW'($urandom);
      upd_en = $urandom_range(0, 2) == 0;
      upd_mask = S'($urandom);
      upd_val = RW'($urandom);
      rd_idx = PW'($urandom_range(0, S-1));
      #1;
      for (int g = 0; g < S; g++) eop[g] = (ml[g] == probe);
      checks++;
      if (perm_op !== eop || rd_loc !== ml[rd_idx] || rd_phys !== mp[rd_idx]) begin
        failures++;
        if (failures < 10) $display("step %0d: perm_op %b expected %b", n, perm_op, eop);
      end
      if (eop != 0) n_hit++;
      for (int g = 0; g < S; g++) begin
        if (pivot_en && trig[g]) begin ml[g] = cur_pos; mp[g] = cur_phys; n_cap++; end
        else if (upd_en && upd_mask[g]) begin ml[g] = upd_val; n_upd++; end
      end
    end
    checks++;
    if (!n_cap || !n_hit || !n_upd) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
