// tb_em_postcond_check: checks the second check with random records and
// signal sets, and a few hand-made cases. The expected verdict is computed
// one signal at a time: a bit fails if it is forced and has the wrong value,
// or must hold and changed; with no record hit, the check fails and no
// violation bit is reported.
module tb_em_postcond_check;
  import zpu_em_pkg::*;

  logic             hit;
  trans_rec_t       rec;
  ctrl_sig_t        s_prev, s_cur;
  logic             ok;
  logic [SIG_W-1:0] viol;
  int checks = 0, failures = 0;

  em_postcond_check dut (
    .hit_i(hit), .rec_i(rec), .prev_sig_i(s_prev), .cur_sig_i(s_cur),
    .ok_o(ok), .viol_o(viol)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [SIG_W-1:0] exp_v;
    logic [SIG_W-1:0] p, c;
    // hand-made: record EXECUTE->NOP (entry of opcode NOP) with in_interrupt
    // raised must flag exactly that bit
    rec = rec_find(ST_EXECUTE, ST_NOP);
    hit = 1'b1;
    s_prev = '0; s_cur = '0;
    #1 check(ok && viol == '0, "quiet EXECUTE->NOP accepted");
    s_cur.in_interrupt = 1'b1;
    #1 check(!ok && viol == F_INT, "in_interrupt raised");
    s_cur = '0; s_cur.mem_read = 1'b1;
    #1 check(!ok && viol == F_RD, "read strobe in NOP");
    s_cur = '0; s_cur.mem_busy = 1'b1; s_cur.irq = 1'b1;
    #1 check(ok, "inputs are free");
    hit = 1'b0;
    #1 check(!ok && viol == '0, "no record, no pass");

    for (int n = 0; n < 20000; n++) begin
      hit = ($urandom_range(9) != 0);
      rec = {$urandom, $urandom, $urandom};
      if ($urandom_range(1)) rec = ZPU_TABLE[$urandom_range(ZPU_TABLE_USED - 1)];
      p = SIG_W'($urandom);
      c = ($urandom_range(1)) ? p ^ (SIG_W'(1) << $urandom_range(SIG_W - 1))
                              : SIG_W'($urandom);
      if ($urandom_range(3) == 0)
        c = (c & ~rec.post_mask) | (rec.post_val & rec.post_mask);
      s_prev = p; s_cur = c;
      #1;
      exp_v = '0;
      for (int b = 0; b < int'(SIG_W); b++) begin
        if (rec.post_mask[b] && c[b] != rec.post_val[b]) exp_v[b] = 1'b1;
        if (rec.hold_mask[b] && c[b] != p[b])            exp_v[b] = 1'b1;
      end
      if (!hit) exp_v = '0;
      check(viol == exp_v && ok == (hit && exp_v == '0),
            $sformatf("n=%0d viol %h exp %h", n, viol, exp_v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic trans_rec_t rec_find(zpu_state_e a, zpu_state_e b);
    for (int i = 0; i < int'(N_TRANS); i++)
      if (ZPU_TABLE[i].valid && ZPU_TABLE[i].from_state == a && ZPU_TABLE[i].to_state == b)
        return ZPU_TABLE[i];
    return '0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
