// tb_vp_renamer_top: end-to-end test of the rename / value-prediction core at
// its default (full) size.
//
// The testbench plays the parts of the core that are outside the design: a
// front end that fetches a looping program, execution lanes that complete
// instructions out of order with their true results, a branch unit, and a
// memory system that sometimes stalls the oldest instruction for a long time.
//
// Program: 48 static instructions repeated; dynamic instruction s is slot
// j = s % 48 of iteration it = s / 48, PC 0x1000 + 4j. In "branchy" stretches
// every third slot is a checkpointed branch; otherwise those slots are
// arithmetic. Results depend only on (j, it): pure-stride slots
// (base + 3*it, never mispredicted once learned unless the slot was skipped or
// prediction was off for a while), phase-change slots (the
// stride changes every 300 iterations, giving confident mispredictions), and
// random slots. About one branch in five is mispredicted; the front end then
// fetches wrong-path instructions (other PCs, random results, branches that
// resolve as predicted) until the branch
// resolves, and resumes after it. Rare exceptions and load violations are
// injected once per dynamic instruction. Value prediction (vp_en) and the
// confidence layer (eves_en) are switched on and off in stretches.
//
// Checked: every retirement is in program order, of completed correct-path
// instructions; after every cycle, the committed register of random logical
// registers reads back ready with the architecturally correct value; a used
// prediction is in the register file and ready in the cycle after dispatch; a
// writeback flags a value mispredict exactly when a used prediction was wrong;
// pure-stride slots never mispredict; a value mispredict squashes right after
// that instruction retires and an exception or load violation squashes at the
// head without retiring it; predictions are never used with vp_en low or, with
// eves_en high, during the cooldown or while SafeStride has prediction off.
// Each mechanism must have happened at least once: the four stalls, correct
// and mispredicted branch resolves, the VPQ rollback walk, used predictions,
// SVP training, value-mispredict, exception and load-violation squashes, the
// cooldown, SafeStride switching prediction off and the mode switches.
module tb_vp_renamer_top;
  import vp_pkg::*;
  localparam int W = vp_pkg::WIDTH, NL = vp_pkg::N_LOG, NP = vp_pkg::N_PHYS,
                 ALS = vp_pkg::AL_SIZE, NB = vp_pkg::N_BRANCH, X = vp_pkg::XLEN;
  localparam int LW = $clog2(NL), PW = $clog2(NP), AW = $clog2(ALS), BW = $clog2(NB),
                 CW = $clog2(W + 1), NRD = 3 * W;
  localparam int L = 48;
  localparam int CYCLES = 160000;

  logic clk = 0, rst_n = 0, vp_en = 1, eves_en = 0;
  logic [W-1:0] in_valid = 0, in_dst_valid = 0, in_ckpt = 0, in_load = 0, in_store = 0, in_branch = 0;
  logic [W-1:0][2:0] in_src_valid = '0;
  logic [W-1:0][2:0][LW-1:0] in_src_log = '0;
  logic [W-1:0][LW-1:0] in_dst_log = '0;
  vtype_e [W-1:0] in_vtype;
  logic [W-1:0][63:0] in_pc = '0;
  logic in_ready, stall_reg, stall_branch, stall_dispatch, stall_vpq;
  logic [W-1:0] out_valid, out_vp_used;
  logic [W-1:0][2:0][PW-1:0] out_src_phys;
  logic [W-1:0][PW-1:0] out_dst_phys;
  logic [W-1:0][AW-1:0] out_al_idx;
  logic [W-1:0][BW-1:0] out_branch_id;
  logic [W-1:0][NB-1:0] out_branch_mask;
  logic [W-1:0][X-1:0] out_vp_value;
  logic [NRD-1:0][PW-1:0] rd_addr = '0;
  logic [NRD-1:0][X-1:0] rd_data;
  logic [NRD-1:0] rd_ready;
  logic [W-1:0] wb_valid = 0, wb_dst_valid = 0, wb_val_misp;
  logic [W-1:0][AW-1:0] wb_al_idx = '0;
  logic [W-1:0][PW-1:0] wb_phys = '0;
  logic [W-1:0][X-1:0] wb_value = '0;
  logic res_valid = 0, res_correct = 0, exc_valid = 0, lv_valid = 0;
  logic [AW-1:0] res_al_idx = 0, exc_idx = 0, lv_idx = 0;
  logic [BW-1:0] res_id = 0;
  logic [CW-1:0] retire_n;
  logic squash_out, squash_vm, vpq_busy, train_valid, cooldown_active, ss_disable;
  logic [NL-1:0][PW-1:0] amt_map;

  vp_renamer_top dut (.*);

  always #5 clk = ~clk;

  // ------------------------------------------------------------ program
  typedef struct {
    longint seq;           // program order number, -1 on the wrong path
    int al; bit dv; int lg; int ph; longint pc; bit br; int bid; bit misp;
    bit cmp; bit resolved; bit exc; bit lv; bit vpe; bit used; longint pred; longint act;
    bit strd;              // pure-stride slot
    bit ldst;              // load or store
  } ins_t;

  function automatic bit branchy(input longint it); return (it / 25) % 3 == 0; endfunction
  function automatic bit is_br(input longint s); return branchy(s / L) && (s % L) % 3 == 2; endfunction
  function automatic int kind(input longint s);  // 0 stride, 1 phase change, 2 random, 3 no value
    int j;
    j = int'(s % L);
    if (j % 8 == 5 && branchy(s / L)) return 3;
    if (j % 7 == 4) return 2;
    if (j % 4 == 1) return 1;
    return 0;
  endfunction
  function automatic longint actual_of(input longint s);
    longint it, j, ph, st;
    it = s / L; j = s % L;
    case (kind(s))
      0: return 64'h10000 * j + 3 * it;
      1: begin
        ph = it / 300; st = 1 + ph % 3;
        return 64'h100000 * j + 1000000 * ph + st * (it % 300);
      end
      default: return longint'({$urandom, $urandom});
    endcase
  endfunction
  function automatic vtype_e vtype_of(input longint s);
    int j;
    j = int'(s % L);
    if (kind(s) == 3) return VT_NONE;
    case (j % 3)
      0: return VT_INTALU;
      1: return VT_LOAD;
      default: return VT_FPALU;
    endcase
  endfunction

  ins_t win[$];
  longint arch [NL];
  longint fetch_seq = 0;
  bit wrong_path = 0;
  bit done_fault [longint];
  int checks = 0, failures = 0;
  int n_sreg = 0, n_sbr = 0, n_sdisp = 0, n_svpq = 0, n_misp = 0, n_corr = 0, n_walk = 0,
      n_used = 0, n_train = 0, n_vmsq = 0, n_excsq = 0, n_lvsq = 0, n_cd = 0, n_ss = 0,
      n_mode = 0, n_retired = 0, n_vm_wb = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int miss_until;
    for (int l = 0; l < NL; l++) arch[l] = 0;
    miss_until = 0;
    in_vtype = '{default: VT_NONE};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      int nret, br_i, nb;
      longint last_ret;
      bit used_now [W];
      int used_ph [W];
      bit sq, sqvm, misp_now;
      ins_t fetched [W];
      @(negedge clk);
      // ---- modes: vp/eves stretches
      begin
        bit nv, ne;
        int seg;
        seg = (cyc / 10000) % 4;
        nv = (seg != 3);
        ne = (seg == 1 || seg == 2);
        if (nv != vp_en || ne != eves_en) n_mode++;
        vp_en = nv; eves_en = ne;
      end
      in_valid = 0; wb_valid = 0; wb_dst_valid = 0; res_valid = 0; exc_valid = 0; lv_valid = 0;
      in_ckpt = 0; in_branch = 0; in_dst_valid = 0;
      // ---- retire view (depends on state only)
      nret = int'(retire_n); sq = squash_out; sqvm = squash_vm;
      check(nret <= win.size(), "retire count within the window");
      for (int k = 0; k < nret && k < win.size(); k++) begin
        check(win[k].cmp && win[k].seq >= 0 && !win[k].exc && !win[k].lv, "retiring a completed correct-path instruction");
        if (win[k].used && win[k].pred != win[k].act)
          check(sqvm && k == nret - 1, "value mispredict squashes right after it retires");
      end
      if (win.size() > 0 && win[0].cmp && (win[0].exc || win[0].lv))
        check(sq && !sqvm && nret == 0, "exception / load violation squashes at the head");
      else if (win.size() > 0 && win[0].cmp)
        check(nret > 0, "completed head retires");
      if (sqvm) check(sq && nret > 0 && win[nret-1].used && win[nret-1].pred != win[nret-1].act, "squash_vm reason");
      if (sq && !sqvm) check(win.size() > 0 && win[0].cmp && (win[0].exc || win[0].lv), "squash reason");
      if (train_valid) n_train++;
      if (vpq_busy) n_walk++;
      if (cooldown_active) n_cd++;
      if (ss_disable) n_ss++;
      misp_now = 0;
      br_i = -1;
      if (!sq) begin
        // ---- branch unit: one resolve per cycle, lane 0 completes it
        // branches wait for a missing load like everything else
        if (cyc >= miss_until && $urandom_range(0, 2) == 0) begin
          int cands[$];
          cands.delete();
          foreach (win[i]) if (win[i].br && !win[i].resolved) cands.push_back(i);
          if (cands.size() > 0) begin
            br_i = ($urandom_range(0, 1)) ? cands[0] : cands[$urandom_range(0, cands.size() - 1)];
            res_valid = 1; res_al_idx = AW'(win[br_i].al); res_id = BW'(win[br_i].bid);
            res_correct = !win[br_i].misp; misp_now = win[br_i].misp;
            wb_valid[0] = 1; wb_al_idx[0] = AW'(win[br_i].al); wb_dst_valid[0] = 0;
          end
        end
        // ---- execution lanes 1..W-1 (and lane 0 if free); the oldest may sit in a miss
        if (cyc % 3000 == 0) miss_until = cyc + $urandom_range(200, 600);
        for (int k = 0; k < W; k++) begin
          int i;
          if (wb_valid[k] || win.size() == 0) continue;
          i = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(0, win.size() - 1);
          if (win[i].cmp || win[i].br) continue;
          if (i == 0 && cyc < miss_until) continue;
          if (misp_now && i > br_i) continue;  // not behind a branch that mispredicts now
          begin
            bit dup;
            dup = 0;
            for (int j = 0; j < k; j++) if (wb_valid[j] && int'(wb_al_idx[j]) == win[i].al) dup = 1;
            if (dup) continue;
          end
          if (win[i].seq >= 0 && !done_fault.exists(win[i].seq) && $urandom_range(0, 1999) == 0) begin
            // this execution faults (once per dynamic instruction)
            if ($urandom_range(0, 1) && !exc_valid) begin
              exc_valid = 1; exc_idx = AW'(win[i].al); win[i].exc = 1;
            end else if (!lv_valid) begin
              lv_valid = 1; lv_idx = AW'(win[i].al); win[i].lv = 1;
            end
            done_fault[win[i].seq] = 1;
          end
          wb_valid[k] = 1; wb_al_idx[k] = AW'(win[i].al); wb_dst_valid[k] = win[i].dv;
          wb_phys[k] = PW'(win[i].ph); wb_value[k] = win[i].act;
        end
        // ---- front end: up to W instructions from the current fetch point
        nb = $urandom_range(1, W);
        for (int k = 0; k < nb; k++) begin
          ins_t e;
          e = '{default: 0};
          if (wrong_path) begin
            e.seq = -1; e.pc = 64'h9000 + 4 * $urandom_range(0, 63);
            e.br = ($urandom_range(0, 2) == 0);
            e.dv = !e.br && 1'($urandom); e.lg = $urandom_range(0, NL - 1);
            e.act = longint'({$urandom, $urandom});
            in_vtype[k] = e.dv ? vtype_e'($urandom_range(0, 3)) : VT_NONE;
          end else begin
            e.seq = fetch_seq + k;
            e.pc = 64'h1000 + 4 * (e.seq % L);
            e.br = is_br(e.seq);
            e.dv = !e.br;
            e.lg = int'((e.seq % L) * 7 + 1) % NL;
            e.act = actual_of(e.seq);
            // a slot that is a branch in other stretches has gaps in its
            // value sequence; right after prediction was off, learned entries
            // are stale: both may mispredict legitimately
            e.strd = (kind(e.seq) == 0) && (e.seq % L) % 3 != 2 && (cyc % 40000) >= 3000;
            in_vtype[k] = e.br ? VT_NONE : vtype_of(e.seq);
          end
          e.ldst = (in_vtype[k] == VT_LOAD);
          in_valid[k] = 1; in_dst_valid[k] = e.dv; in_dst_log[k] = LW'(e.lg);
          in_ckpt[k] = e.br; in_branch[k] = e.br; in_pc[k] = e.pc;
          in_load[k] = e.ldst; in_store[k] = 0;
          for (int s = 0; s < 3; s++) begin
            in_src_valid[k][s] = 1'($urandom); in_src_log[k][s] = LW'($urandom_range(0, NL - 1));
          end
          fetched[k] = e;
          if (e.br) begin nb = k + 1; break; end  // a branch ends the fetch bundle
        end
        for (int k = nb; k < W; k++) in_vtype[k] = VT_NONE;
      end
      #1;
      if (stall_reg) n_sreg++;
      if (stall_branch) n_sbr++;
      if (stall_dispatch) n_sdisp++;
      if (stall_vpq) n_svpq++;
      check(!(in_ready && sq), "no dispatch in a squash cycle");
      for (int k = 0; k < W; k++) begin
        if (out_vp_used[k]) begin
          check(vp_en, "no prediction used with vp_en low");
          check(!(eves_en && (cooldown_active || ss_disable)), "no prediction used while held off");
        end
        check(int'(wb_val_misp[k]) == 0 || wb_valid[k], "mispredict flag only on a writeback");
      end
      // writeback mispredict flags against the model
      for (int k = 0; k < W; k++)
        if (wb_valid[k]) begin
          foreach (win[i]) if (win[i].al == int'(wb_al_idx[k])) begin
            if (win[i].dv)
              check(wb_val_misp[k] == (win[i].used && win[i].pred != win[i].act), "value mispredict flag");
            if (wb_val_misp[k]) begin
              n_vm_wb++;
              check(!win[i].strd || win[i].seq < 0, "pure-stride slot never mispredicts");
            end
            win[i].cmp = 1;
          end
        end
      // dispatch
      if (in_ready) begin
        for (int k = 0; k < W; k++)
          if (in_valid[k]) begin
            ins_t e;
            e = fetched[k];
            e.al = out_al_idx[k]; e.ph = out_dst_phys[k]; e.bid = out_branch_id[k];
            e.vpe = e.dv && in_vtype[k] != VT_NONE && vp_en;
            e.used = out_vp_used[k]; e.pred = out_vp_value[k];
            if (e.used) n_used++;
            if (e.br && e.seq >= 0 && $urandom_range(0, 4) == 0) e.misp = 1;
            win.push_back(e);
            if (e.br && e.misp) wrong_path = 1;
          end
        for (int k = 0; k < W; k++) if (in_valid[k] && fetched[k].seq >= 0) fetch_seq = fetched[k].seq + 1;
      end
      for (int k = 0; k < W; k++) begin
        used_now[k] = in_ready && out_vp_used[k];
        used_ph[k] = out_dst_phys[k];
      end
      // branch unit completions
      if (res_valid) begin
        win[br_i].cmp = 1; win[br_i].resolved = 1;
      end
      @(posedge clk);
      // ---- model update
      for (int k = 0; k < nret; k++) begin
        if (win[0].dv) arch[win[0].lg] = win[0].act;
        last_ret = win[0].seq;
        void'(win.pop_front());
        n_retired++;
      end
      if (sq) begin
        if (sqvm) n_vmsq++;
        else if (win[0].exc) n_excsq++;
        else n_lvsq++;
        // re-fetch from the oldest instruction that did not retire
        fetch_seq = sqvm ? last_ret + 1 : win[0].seq;
        win.delete();
        wrong_path = 0;
      end else if (res_valid) begin
        if (!res_correct) begin
          while (win.size() > br_i + 1 - nret) void'(win.pop_back());
          fetch_seq = win[win.size() - 1].seq + 1;
          wrong_path = 0;
          n_misp++;
        end else n_corr++;
      end
      // ---- committed state reads back with the right values
      #1;
      for (int p = 0; p < 2 * W; p++) rd_addr[p] = amt_map[$urandom_range(0, NL - 1)];
      #1;
      for (int p = 0; p < 2 * W; p++) begin
        int l;
        l = -1;
        for (int q = 0; q < NL; q++) if (amt_map[q] == rd_addr[p]) l = q;
        check(rd_ready[p] && rd_data[p] == arch[l], "committed register value");
      end
      // ---- used predictions sit in the register file, ready
      for (int k = 0; k < W; k++) begin
        rd_addr[2 * W + k] = '0;
        if (used_now[k]) rd_addr[2 * W + k] = PW'(used_ph[k]);
      end
      #1;
      for (int k = 0; k < W; k++)
        if (used_now[k] && !sq)
          check(rd_ready[2 * W + k], "used prediction is ready after dispatch");
    end
    $display("stall_reg=%0d stall_branch=%0d stall_dispatch=%0d stall_vpq=%0d", n_sreg, n_sbr, n_sdisp, n_svpq);
    $display("br_correct=%0d br_misp=%0d vpq_walk_cycles=%0d used=%0d trained=%0d vm_writebacks=%0d",
             n_corr, n_misp, n_walk, n_used, n_train, n_vm_wb);
    $display("squash_vm=%0d squash_exc=%0d squash_lv=%0d cooldown_cycles=%0d ss_off_cycles=%0d mode_switches=%0d retired=%0d",
             n_vmsq, n_excsq, n_lvsq, n_cd, n_ss, n_mode, n_retired);
    check(n_sreg > 0, "coverage: stall_reg");
    check(n_sbr > 0, "coverage: stall_branch");
    check(n_sdisp > 0, "coverage: stall_dispatch");
    check(n_svpq > 0, "coverage: stall_vpq");
    check(n_corr > 0 && n_misp > 0, "coverage: branch resolves");
    check(n_walk > 0, "coverage: VPQ rollback walk");
    check(n_used > 0 && n_train > 0, "coverage: predictions used and trained");
    check(n_vmsq > 0, "coverage: value-mispredict squash");
    check(n_excsq > 0 && n_lvsq > 0, "coverage: exception and load-violation squash");
    check(n_cd > 0, "coverage: cooldown");
    check(n_ss > 0, "coverage: SafeStride off");
    check(n_mode > 0, "coverage: mode switches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
