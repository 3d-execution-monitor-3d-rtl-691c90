// tb_em_transition_lookup: checks the first check on the ZPU table.
//
// Directed cases, worked out by hand from the control graph, come first
// (e.g. DECODE with a pending interrupt and none in service may go to
// INTERRUPT; NOP may not go to RESYNC; FETCH may loop only while memory is
// busy). Then each filled entry is hit from a query built to satisfy it,
// with its don't-care bits random, and must return its own number. Last,
// random queries are compared with a plain search of the table written in
// the testbench.
module tb_em_transition_lookup;
  import zpu_em_pkg::*;

  localparam int unsigned IDX_W = $clog2(N_TRANS + 1);

  em_sample_t       prev;
  zpu_state_e       cur;
  logic             hit;
  logic [IDX_W-1:0] index;
  trans_rec_t       rec;
  int checks = 0, failures = 0;

  em_transition_lookup dut (
    .prev_i(prev), .cur_state_i(cur), .hit_o(hit), .index_o(index), .rec_o(rec)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic ctrl_sig_t sig(logic busy, logic irq, logic inint, zpu_op_e op);
    ctrl_sig_t s;
    s = '0;
    s.mem_busy = busy; s.irq = irq; s.in_interrupt = inint; s.op = op;
    return s;
  endfunction

  task automatic query(input zpu_state_e a, input ctrl_sig_t s,
                       input zpu_state_e b, input logic exp_hit, input string what);
    prev.state = a; prev.sig = s; cur = b;
    #1;
    check(hit == exp_hit, what);
    if (exp_hit)
      check(index != 0 && rec.from_state == a && rec.to_state == b, {what, " record"});
    else
      check(index == 0, {what, " index"});
  endtask

  initial begin
    int unsigned ri;
    logic        ref_hit;
    int unsigned ref_idx;
    // directed cases
    query(ST_RESYNC,  sig(0,0,0,OP_NOP), ST_RESYNC2, 1, "RESYNC->RESYNC2");
    query(ST_RESYNC,  sig(1,0,0,OP_NOP), ST_RESYNC2, 0, "RESYNC busy ->RESYNC2");
    query(ST_RESYNC3, sig(1,1,1,OP_IM),  ST_DECODE,  1, "RESYNC3->DECODE");
    query(ST_FETCH,   sig(1,0,0,OP_NOP), ST_FETCH,   1, "FETCH stall");
    query(ST_FETCH,   sig(0,0,0,OP_NOP), ST_FETCH,   0, "FETCH loop when ready");
    query(ST_DECODE,  sig(0,1,0,OP_NOP), ST_INTERRUPT, 1, "DECODE->INTERRUPT");
    query(ST_DECODE,  sig(0,1,1,OP_NOP), ST_INTERRUPT, 0, "nested interrupt");
    query(ST_DECODE,  sig(0,1,0,OP_NOP), ST_DECODE2, 0, "interrupt ignored");
    query(ST_DECODE,  sig(0,1,1,OP_NOP), ST_DECODE2, 1, "DECODE->DECODE2 in service");
    query(ST_INTERRUPT, sig(0,0,1,OP_NOP), ST_DECODE, 1, "INTERRUPT->DECODE");
    query(ST_DECODE2, sig(0,0,0,OP_LOAD), ST_EXECUTE, 1, "DECODE2->EXECUTE");
    query(ST_EXECUTE, sig(0,0,0,OP_IM),   ST_IM,      1, "EXECUTE IM");
    query(ST_EXECUTE, sig(0,0,0,OP_NOP),  ST_IM,      0, "EXECUTE NOP->IM");
    query(ST_EXECUTE, sig(0,0,0,OP_POPPC), ST_RESYNC, 1, "EXECUTE POPPC->RESYNC");
    query(ST_EXECUTE, sig(0,0,0,OP_BREAK), ST_FETCH,  1, "EXECUTE BREAK->FETCH");
    query(ST_NOP,     sig(0,0,0,OP_NOP),  ST_FETCH,   1, "NOP->FETCH");
    query(ST_NOP,     sig(0,0,0,OP_NOP),  ST_RESYNC,  0, "NOP->RESYNC");
    query(ST_EMULATE2, sig(0,0,0,OP_EMULATE), ST_RESYNC, 1, "EMULATE2->RESYNC");
    query(ST_STORE2,  sig(0,0,0,OP_STORE), ST_STORE3, 1, "STORE2->STORE3");
    query(ST_STORE2,  sig(0,0,0,OP_STORE), ST_FETCH,  0, "STORE2->FETCH");

    // every filled entry returns its own number
    for (int i = 0; i < int'(ZPU_TABLE_USED); i++) begin
      prev.state = ZPU_TABLE[i].from_state;
      prev.sig   = (SIG_W'($urandom) & ~ZPU_TABLE[i].pre_mask) | ZPU_TABLE[i].pre_val;
      cur        = ZPU_TABLE[i].to_state;
      #1;
      check(hit && index == IDX_W'(i + 1), $sformatf("entry %0d got %0d", i + 1, index));
    end
    for (int i = int'(ZPU_TABLE_USED); i < int'(N_TRANS); i++)
      check(!ZPU_TABLE[i].valid, $sformatf("entry %0d should be empty", i + 1));

    // random queries against a plain search
    for (int n = 0; n < 20000; n++) begin
      ri = $urandom_range(N_STATES - 1);
      prev.state = zpu_state_e'(ri);
      prev.sig   = SIG_W'($urandom);
      prev.sig.op = zpu_op_e'($urandom_range(N_OPS - 1));
      cur = zpu_state_e'($urandom_range(N_STATES - 1));
      if ($urandom_range(1)) cur = next_state(prev.state);
      #1;
      ref_hit = 1'b0; ref_idx = 0;
      for (int i = 0; i < int'(N_TRANS); i++)
        if (!ref_hit && ZPU_TABLE[i].valid && ZPU_TABLE[i].from_state == prev.state
            && ZPU_TABLE[i].to_state == cur
            && (prev.sig & ZPU_TABLE[i].pre_mask) == ZPU_TABLE[i].pre_val) begin
          ref_hit = 1'b1; ref_idx = i + 1;
        end
      check(hit == ref_hit && index == IDX_W'(ref_idx),
            $sformatf("random %s->%s: %0d/%0d vs %0d/%0d", prev.state.name(),
                      cur.name(), hit, index, ref_hit, ref_idx));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
