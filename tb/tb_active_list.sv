// tb_active_list: self-checking test of the active list.
//
// A queue model holds the in-flight entries (index, destination, PC, status
// bits). Random cycles dispatch up to WIDTH entries, complete random entries,
// set value-mispredict, exception and load-violation bits, commit from the
// head, roll the tail back to a random in-flight branch, or squash. Every
// cycle the occupancy, the indices handed to the next dispatch and all fields
// of the WIDTH head entries are compared with the model.
module tb_active_list;
  localparam int AL_SIZE = 256, WIDTH = 4, N_LOG = 64, N_PHYS = 320, PC_BITS = 64;
  localparam int AW = $clog2(AL_SIZE), LW = $clog2(N_LOG), PW = $clog2(N_PHYS), CW = $clog2(WIDTH + 1);

  logic clk = 0, rst_n = 0;
  logic [CW-1:0] disp_n = 0, commit_n = 0;
  logic [WIDTH-1:0] disp_dst_valid = 0, disp_load = 0, disp_store = 0, disp_branch = 0, disp_vp = 0;
  logic [WIDTH-1:0][LW-1:0] disp_log = '0;
  logic [WIDTH-1:0][PW-1:0] disp_phys = '0;
  logic [WIDTH-1:0][PC_BITS-1:0] disp_pc = '0;
  logic [WIDTH-1:0][AW-1:0] disp_idx, cmp_idx = '0, vm_idx = '0, head_idx;
  logic [$clog2(AL_SIZE+1)-1:0] free_cnt, used_cnt;
  logic [WIDTH-1:0] cmp_valid = 0, vm_valid = 0;
  logic exc_valid = 0, lv_valid = 0, rollback_en = 0, squash = 0;
  logic [AW-1:0] exc_idx = 0, lv_idx = 0, rollback_idx = 0, al_head;
  logic [WIDTH-1:0] head_valid, head_dst_valid, head_complete, head_exc, head_lv, head_brm,
                    head_vm, head_load, head_store, head_branch, head_vp;
  logic [WIDTH-1:0][LW-1:0] head_log;
  logic [WIDTH-1:0][PW-1:0] head_phys;
  logic [WIDTH-1:0][PC_BITS-1:0] head_pc;

  active_list #(.AL_SIZE(AL_SIZE), .WIDTH(WIDTH), .N_LOG(N_LOG), .N_PHYS(N_PHYS),
                .PC_BITS(PC_BITS)) dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    int idx; bit dv; int lg; int ph; bit ld, st, br, vp; longint pc;
    bit cmp, exc, lv, vm;
  } ent_t;
  ent_t q[$];
  int tail_m = 0;
  int checks = 0, failures = 0;
  int n_roll = 0, n_squash = 0, n_full = 0, n_wrap = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic compare();
    check(int'(used_cnt) == q.size(), $sformatf("used %0d vs %0d", used_cnt, q.size()));
    check(int'(free_cnt) == AL_SIZE - q.size(), "free_cnt");
    for (int k = 0; k < WIDTH; k++) begin
      check(int'(disp_idx[k]) == (tail_m + k) % AL_SIZE, "disp_idx");
      check(head_valid[k] == (k < q.size()), "head_valid");
      if (k < q.size()) begin
        check(int'(head_idx[k]) == q[k].idx, "head_idx");
        check(head_dst_valid[k] == q[k].dv && int'(head_log[k]) == q[k].lg &&
              int'(head_phys[k]) == q[k].ph && head_pc[k] == q[k].pc, "head fields");
        check(head_load[k] == q[k].ld && head_store[k] == q[k].st &&
              head_branch[k] == q[k].br && head_vp[k] == q[k].vp, "head kind");
        check(head_complete[k] == q[k].cmp && head_exc[k] == q[k].exc &&
              head_lv[k] == q[k].lv && head_vm[k] == q[k].vm && !head_brm[k], "head status");
      end
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int r, nd, nc;
      r = $urandom_range(0, 199);
      disp_n = 0; commit_n = 0; cmp_valid = 0; vm_valid = 0; exc_valid = 0; lv_valid = 0;
      rollback_en = 0; squash = 0;
      if (r == 0) begin
        squash = 1; q.delete(); tail_m = 0; n_squash++;
      end else begin
        // status updates on random in-flight entries
        for (int k = 0; k < WIDTH; k++)
          if (q.size() > 0 && $urandom_range(0, 1)) begin
            int i;
            i = $urandom_range(0, q.size() - 1);
            cmp_valid[k] = 1; cmp_idx[k] = AW'(q[i].idx); q[i].cmp = 1;
            if ($urandom_range(0, 19) == 0) begin
              vm_valid[k] = 1; vm_idx[k] = AW'(q[i].idx); q[i].vm = 1;
            end
          end
        if (q.size() > 0 && $urandom_range(0, 30) == 0) begin
          int i;
          i = $urandom_range(0, q.size() - 1);
          exc_valid = 1; exc_idx = AW'(q[i].idx); q[i].exc = 1;
        end
        if (q.size() > 0 && $urandom_range(0, 30) == 0) begin
          int i;
          i = $urandom_range(0, q.size() - 1);
          lv_valid = 1; lv_idx = AW'(q[i].idx); q[i].lv = 1;
        end
        // commit from the head (biased to let the list fill up sometimes)
        nc = $urandom_range(0, (cyc / 2000) % 2 ? 1 : WIDTH);
        if (nc > q.size()) nc = q.size();
        commit_n = CW'(nc);
        if (r < 8 && q.size() > nc + 1) begin
          // roll back to a random entry that is not being committed
          int i;
          i = $urandom_range(nc, q.size() - 1);
          rollback_en = 1; rollback_idx = AW'(q[i].idx);
          while (q.size() > i + 1) void'(q.pop_back());
          tail_m = (q[i].idx + 1) % AL_SIZE;
          n_roll++;
        end else begin
          nd = $urandom_range(0, WIDTH);
          if (nd > AL_SIZE - q.size()) nd = AL_SIZE - q.size();
          disp_n = CW'(nd);
          for (int k = 0; k < nd; k++) begin
            ent_t e;
            e.idx = tail_m; e.dv = 1'($urandom); e.lg = $urandom_range(0, N_LOG - 1);
            e.ph = $urandom_range(0, N_PHYS - 1); e.ld = 1'($urandom); e.st = 1'($urandom);
            e.br = 1'($urandom); e.vp = 1'($urandom); e.pc = {$urandom, $urandom};
            e.cmp = 0; e.exc = 0; e.lv = 0; e.vm = 0;
            disp_dst_valid[k] = e.dv; disp_log[k] = LW'(e.lg); disp_phys[k] = PW'(e.ph);
            disp_load[k] = e.ld; disp_store[k] = e.st; disp_branch[k] = e.br; disp_vp[k] = e.vp;
            disp_pc[k] = e.pc;
            q.push_back(e);
            if (tail_m == AL_SIZE - 1) n_wrap++;
            tail_m = (tail_m + 1) % AL_SIZE;
          end
        end
        for (int k = 0; k < nc; k++) void'(q.pop_front());
      end
      @(posedge clk);
      @(negedge clk);
      compare();
      if (q.size() == AL_SIZE) n_full++;
    end
    check(n_roll > 0 && n_squash > 0 && n_full > 0 && n_wrap > 0, "coverage");
    $display("rollbacks=%0d squashes=%0d full=%0d wraps=%0d", n_roll, n_squash, n_full, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
