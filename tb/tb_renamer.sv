// tb_renamer: self-checking test of the renamer.
//
// The model does not re-implement the free list; it checks what renaming must
// guarantee. It keeps its own speculative map built from the destinations the
// renamer hands out, a committed map, the in-flight instruction window with
// per-branch map snapshots, and the active branch IDs. Random bundles (with
// dependences inside the bundle), completions, branch resolutions (correct and
// mispredicted), exceptions, load violations, value mispredicts, commits and
// full squashes are applied. A value-mispredicted entry may retire but ends
// its retire group, and its retirement comes with a full squash. Checked every cycle: each source reads the
// producer the program order says (including an earlier slot of the same
// bundle, and after a checkpoint restore or a squash); each new destination is
// a register nobody holds; the three stall outputs and whether the bundle is
// taken; active-list indices; branch IDs and branch masks; the count of
// retirable head entries and the squash request; and the committed map.
// Sizes are reduced so that every stall condition is reached often.
module tb_renamer;
  localparam int WIDTH = 4, N_LOG = 16, N_PHYS = 48, AL_SIZE = 32, N_BRANCH = 8, PC_BITS = 64;
  localparam int FL_SIZE = N_PHYS - N_LOG;
  localparam int LW = $clog2(N_LOG), PW = $clog2(N_PHYS), AW = $clog2(AL_SIZE),
                 BW = $clog2(N_BRANCH), CW = $clog2(WIDTH + 1);

  logic clk = 0, rst_n = 0;
  logic [WIDTH-1:0] ren_valid = 0, ren_dst_valid = 0, ren_ckpt = 0, ren_load = 0, ren_store = 0,
                    ren_branch = 0, ren_vp = 0;
  logic [WIDTH-1:0][2:0] ren_src_valid = '0;
  logic [WIDTH-1:0][2:0][LW-1:0] ren_src_log = '0;
  logic [WIDTH-1:0][LW-1:0] ren_dst_log = '0;
  logic [WIDTH-1:0][PC_BITS-1:0] ren_pc = '0;
  logic ren_go = 0, ren_fire, stall_reg, stall_branch, stall_dispatch;
  logic [WIDTH-1:0][2:0][PW-1:0] src_phys;
  logic [WIDTH-1:0][PW-1:0] dst_phys;
  logic [WIDTH-1:0][AW-1:0] al_idx;
  logic [WIDTH-1:0][BW-1:0] branch_id;
  logic [WIDTH-1:0][N_BRANCH-1:0] branch_mask;
  logic [WIDTH-1:0] cmp_valid = 0, vm_valid = 0;
  logic [WIDTH-1:0][AW-1:0] cmp_idx = '0, vm_idx = '0;
  logic exc_valid = 0, lv_valid = 0, res_valid = 0, res_correct = 0, squash = 0;
  logic [AW-1:0] exc_idx = 0, lv_idx = 0, res_al_idx = 0, al_head;
  logic [BW-1:0] res_id = 0;
  logic [WIDTH-1:0] head_valid, head_dst_valid, head_vp, head_vm;
  logic [WIDTH-1:0][LW-1:0] head_log;
  logic [WIDTH-1:0][PW-1:0] head_phys;
  logic [WIDTH-1:0][PC_BITS-1:0] head_pc;
  logic [CW-1:0] retire_ok_n, commit_n = 0;
  logic squash_req;
  logic [N_BRANCH-1:0] gbm;
  logic [N_LOG-1:0][PW-1:0] amt_map;
  logic [$clog2(AL_SIZE+1)-1:0] al_used;

  renamer #(.WIDTH(WIDTH), .N_LOG(N_LOG), .N_PHYS(N_PHYS), .AL_SIZE(AL_SIZE),
            .N_BRANCH(N_BRANCH), .PC_BITS(PC_BITS)) dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    int al; bit dv; int lg; int ph; bit br; int bid; bit resolved; bit cmp; bit fault; bit vm;
    int snap [N_LOG];
  } ins_t;
  ins_t win[$];
  int smap [N_LOG], cmap [N_LOG];
  bit active_id [N_BRANCH];
  int tail_m = 0;
  int checks = 0, failures = 0;
  int n_sreg = 0, n_sbr = 0, n_sdisp = 0, n_misp = 0, n_corr = 0, n_squash = 0, n_commit = 0,
      n_fwd = 0, n_vmsq = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bit in_use(input int p);
    foreach (cmap[l]) if (cmap[l] == p) return 1;
    foreach (win[i]) if (win[i].dv && win[i].ph == p) return 1;
    return 0;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (smap[l]) begin smap[l] = l; cmap[l] = l; end
    foreach (active_id[b]) active_id[b] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      int nv, need_r, need_b, nfl, nbr_free, exp_ok, r, res_i;
      bit exp_fire, misp;
      int new_map [N_LOG];
      @(negedge clk);
      ren_valid = 0; ren_go = 0; cmp_valid = 0; vm_valid = 0; exc_valid = 0; lv_valid = 0;
      res_valid = 0; squash = 0; commit_n = 0; ren_dst_valid = 0; ren_ckpt = 0;
      // ---- retire view
      exp_ok = 0;
      // a value-mispredicted entry may retire but ends the group
      while (exp_ok < WIDTH && exp_ok < win.size() && win[exp_ok].cmp && !win[exp_ok].fault &&
             (exp_ok == 0 || !win[exp_ok-1].vm)) exp_ok++;
      check(int'(retire_ok_n) == exp_ok, $sformatf("retire_ok_n %0d vs %0d", retire_ok_n, exp_ok));
      check(squash_req == (win.size() > 0 && win[0].cmp && win[0].fault), "squash_req");
      if (squash_req) begin
        squash = 1;
      end else begin
        commit_n = CW'($urandom_range(0, exp_ok));
        // VR-1: retiring a value-mispredicted entry squashes everything behind it
        if (commit_n > 0 && win[commit_n-1].vm) begin squash = 1; n_vmsq++; end
      end
      r = $urandom_range(0, 99);
      // ---- bundle
      nv = $urandom_range(1, WIDTH);
      for (int k = 0; k < nv; k++) begin
        ren_valid[k] = 1;
        ren_dst_valid[k] = ($urandom_range(0, 3) != 0);
        ren_dst_log[k] = LW'($urandom_range(0, N_LOG - 1));
        ren_ckpt[k] = ($urandom_range(0, 4) == 0);
        ren_branch[k] = ren_ckpt[k];
        ren_pc[k] = {$urandom, $urandom};
        for (int s = 0; s < 3; s++) begin
          ren_src_valid[k][s] = 1'($urandom);
          // often read what an earlier slot of this bundle writes
          if (k > 0 && ren_dst_valid[k-1] && $urandom_range(0, 2) == 0) ren_src_log[k][s] = ren_dst_log[k-1];
          else ren_src_log[k][s] = LW'($urandom_range(0, N_LOG - 1));
        end
      end
      ren_go = ($urandom_range(0, 9) != 0);
      // ---- completions of random in-flight non-branch instructions
      for (int k = 0; k < WIDTH; k++)
        if (win.size() > 0 && $urandom_range(0, 2) != 0) begin
          int i;
          i = $urandom_range(0, win.size() - 1);
          if (!win[i].br && !win[i].cmp) begin
            cmp_valid[k] = 1; cmp_idx[k] = AW'(win[i].al); win[i].cmp = 1;
            if ($urandom_range(0, 199) == 0) begin
              vm_valid[k] = 1; vm_idx[k] = AW'(win[i].al); win[i].vm = 1;
            end
          end
        end
      if (win.size() > 0 && $urandom_range(0, 299) == 0) begin
        int i;
        i = $urandom_range(0, win.size() - 1);
        if ($urandom_range(0, 1)) begin exc_valid = 1; exc_idx = AW'(win[i].al); end
        else begin lv_valid = 1; lv_idx = AW'(win[i].al); end
        win[i].fault = 1;
      end
      // ---- branch resolution (a branch also completes when it resolves)
      res_i = -1;
      begin
        int cands[$];
        cands.delete();
        foreach (win[i]) if (win[i].br && !win[i].resolved) cands.push_back(i);
        if (cands.size() > 0 && r < 40) begin
          res_i = cands[$urandom_range(0, cands.size() - 1)];
          res_valid = 1; res_id = BW'(win[res_i].bid); res_al_idx = AW'(win[res_i].al);
          res_correct = ($urandom_range(0, 3) != 0);
          begin
            int k;
            k = 0;
            while (k < WIDTH && cmp_valid[k]) k++;
            if (k < WIDTH) begin cmp_valid[k] = 1; cmp_idx[k] = AW'(win[res_i].al); end
            else res_valid = 0;
          end
        end
      end
      misp = res_valid && !res_correct;
      #1;
      #1;
      // ---- rename checks
      need_r = 0; need_b = 0;
      for (int k = 0; k < nv; k++) begin
        if (ren_dst_valid[k]) need_r++;
        if (ren_ckpt[k]) need_b++;
      end
      nfl = FL_SIZE;
      foreach (win[i]) if (win[i].dv) nfl--;
      nbr_free = 0;
      foreach (active_id[b]) if (!active_id[b]) nbr_free++;
      check(stall_reg == (need_r > nfl), "stall_reg");
      check(stall_branch == (need_b > nbr_free), "stall_branch");
      check(stall_dispatch == (nv > AL_SIZE - win.size()), "stall_dispatch");
      if (stall_reg) n_sreg++;
      if (stall_branch) n_sbr++;
      if (stall_dispatch) n_sdisp++;
      exp_fire = ren_go && !stall_reg && !stall_branch && !stall_dispatch && !misp && !squash;
      check(ren_fire == exp_fire, "ren_fire");
      begin
        int m [N_LOG];
        bit ids [N_BRANCH];
        logic [N_BRANCH-1:0] mask;
        int nb;
        m = smap;
        ids = active_id;
        mask = '0;
        foreach (active_id[b]) if (active_id[b]) mask[b] = 1;
        if (res_valid && res_correct) mask[res_id] = 0;
        nb = 0;
        for (int k = 0; k < nv; k++) begin
          for (int s = 0; s < 3; s++)
            if (ren_src_valid[k][s]) begin
              check(int'(src_phys[k][s]) == m[ren_src_log[k][s]], "source mapping");
              if (k > 0 && ren_dst_valid[k-1] && ren_src_log[k][s] == ren_dst_log[k-1]) n_fwd++;
            end
          check(int'(al_idx[k]) == (tail_m + k) % AL_SIZE, "al_idx");
          if (exp_fire) check(branch_mask[k] == mask, $sformatf("branch_mask %b vs %b", branch_mask[k], mask));
          if (exp_fire && ren_dst_valid[k]) begin
            check(!in_use(dst_phys[k]), "destination register is free");
            for (int j = 0; j < k; j++) if (ren_dst_valid[j]) check(dst_phys[j] != dst_phys[k], "distinct destinations");
          end
          // later slots see this destination whether or not the bundle is taken
          if (ren_dst_valid[k]) m[ren_dst_log[k]] = dst_phys[k];
          if (exp_fire && ren_ckpt[k]) begin
            check(!ids[branch_id[k]], "branch id is free");
            ids[branch_id[k]] = 1;
            mask[branch_id[k]] = 1;
          end
          if (exp_fire) begin
            ins_t e;
            e.al = (tail_m + k) % AL_SIZE; e.dv = ren_dst_valid[k]; e.lg = ren_dst_log[k];
            e.ph = dst_phys[k]; e.br = ren_ckpt[k]; e.bid = branch_id[k]; e.resolved = 0;
            e.cmp = 0; e.fault = 0; e.vm = 0; e.snap = m;
            win.push_back(e);
          end
        end
        new_map = m;
      end
      @(posedge clk);
      // ---- model update (order: squash, else mispredict, commit and rename)
      if (squash) begin
        for (int k = 0; k < int'(commit_n); k++) begin
          if (win[0].dv) cmap[win[0].lg] = win[0].ph;
          void'(win.pop_front());
          n_commit++;
        end
        smap = cmap; win.delete(); tail_m = 0;
        foreach (active_id[b]) active_id[b] = 0;
        n_squash++;
      end else begin
        if (exp_fire) begin
          smap = new_map;
          for (int k = 0; k < nv; k++) if (ren_ckpt[k]) active_id[branch_id[k]] = 1;
          tail_m = (tail_m + nv) % AL_SIZE;
        end
        if (res_valid) begin
          int i;
          i = -1;
          foreach (win[j]) if (win[j].al == int'(res_al_idx) && win[j].br) i = j;
          win[i].resolved = 1; win[i].cmp = 1;
          active_id[win[i].bid] = 0;
          if (!res_correct) begin
            smap = win[i].snap;
            while (win.size() > i + 1) begin
              if (win[win.size()-1].br && !win[win.size()-1].resolved) active_id[win[win.size()-1].bid] = 0;
              void'(win.pop_back());
            end
            tail_m = (win[i].al + 1) % AL_SIZE;
            n_misp++;
          end else n_corr++;
        end
        for (int k = 0; k < int'(commit_n); k++) begin
          if (win[0].dv) cmap[win[0].lg] = win[0].ph;
          void'(win.pop_front());
          n_commit++;
        end
      end
      #1;
      begin
        bit same;
        same = 1;
        foreach (cmap[l]) if (int'(amt_map[l]) != cmap[l]) same = 0;
        check(same, "committed map");
      end
    end
    check(n_sreg > 0 && n_sbr > 0 && n_sdisp > 0 && n_misp > 0 && n_corr > 0 && n_squash > 0 &&
          n_fwd > 0 && n_vmsq > 0, "coverage");
    $display("stall_reg=%0d stall_branch=%0d stall_dispatch=%0d misp=%0d correct=%0d squash=%0d commits=%0d fwd=%0d vm_squash=%0d",
             n_sreg, n_sbr, n_sdisp, n_misp, n_corr, n_squash, n_commit, n_fwd, n_vmsq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
