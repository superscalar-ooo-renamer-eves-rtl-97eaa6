// tb_vpq: self-checking test of the value prediction queue.
//
// A queue model follows random allocations (gaps in the active-list indices
// stand for instructions that are not eligible), writebacks that search by
// active-list index, retirements from the head, branch-mispredict rollbacks and
// squashes. Checked: free count, head fields and the stored actual value, the
// match and mispredict outputs of every writeback port (a used prediction
// that differs from the value), and during a rollback walk the order, count
// and PCs of the removed entries and the length of the busy period.
module tb_vpq;
  localparam int SIZE = 64, WIDTH = 4, AL_SIZE = 256, XLEN = 64, PC_BITS = 64;
  localparam int QW = $clog2(SIZE), AW = $clog2(AL_SIZE);

  logic clk = 0, rst_n = 0;
  logic [WIDTH-1:0] al_valid = 0, al_used = 0, al_counted = 0;
  logic [WIDTH-1:0][AW-1:0] al_al_idx = '0;
  logic [WIDTH-1:0][PC_BITS-1:0] al_pc = '0;
  logic [WIDTH-1:0][1:0] al_vtype = '0;
  logic [WIDTH-1:0][XLEN-1:0] al_pred = '0;
  logic [$clog2(SIZE+1)-1:0] free_cnt;
  logic [WIDTH-1:0] wb_valid = 0, wb_match, wb_misp;
  logic [WIDTH-1:0][AW-1:0] wb_al_idx = '0;
  logic [WIDTH-1:0][XLEN-1:0] wb_value = '0;
  logic hd_valid, hd_used, hd_counted, pop = 0, rb_start = 0, un_valid, busy, squash = 0;
  logic [AW-1:0] hd_al_idx, rb_al_head = 0, rb_br_idx = 0;
  logic [PC_BITS-1:0] hd_pc, un_pc;
  logic [1:0] hd_vtype;
  logic [XLEN-1:0] hd_actual;

  vpq #(.SIZE(SIZE), .WIDTH(WIDTH), .AL_SIZE(AL_SIZE), .XLEN(XLEN), .PC_BITS(PC_BITS)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { int al; longint pc; int vt; longint pred; bit used, counted; longint act; } e_t;
  e_t q[$];
  int next_al = 0;
  int checks = 0, failures = 0, n_rb = 0, n_walk = 0, n_misp = 0, n_full = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
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
    for (int cyc = 0; cyc < 30000; cyc++) begin
      int r, old_n;
      @(negedge clk);
      al_valid = 0; wb_valid = 0; pop = 0; rb_start = 0; squash = 0;
      check(int'(free_cnt) == SIZE - q.size(), "free_cnt");
      check(hd_valid == (q.size() > 0), "hd_valid");
      if (q.size() > 0)
        check(int'(hd_al_idx) == q[0].al && hd_pc == q[0].pc && int'(hd_vtype) == q[0].vt &&
              hd_used == q[0].used && hd_counted == q[0].counted && hd_actual == q[0].act, "head");
      if (q.size() == SIZE) n_full++;
      r = $urandom_range(0, 99);
      old_n = q.size();
      // retire the head sometimes
      if (q.size() > 0 && !busy && $urandom_range(0, 2) == 0) pop = 1;
      if (busy) begin
        // rollback walk: youngest entry leaves
        check(q.size() > 0, "walk has entries");
        if (q.size() > 0) begin
          check(un_valid == q[q.size()-1].counted, "un_valid");
          if (q[q.size()-1].counted) check(un_pc == q[q.size()-1].pc, "un_pc");
          void'(q.pop_back());
        end
        n_walk++;
      end else if (r == 0) begin
        squash = 1;
      end else if (r < 6 && q.size() > 1) begin
        // branch between the oldest in-flight entry and the youngest
        int head_al, br, younger, brage;
        head_al = (q[0].al - $urandom_range(0, 2) + AL_SIZE) % AL_SIZE;
        br = (q[$urandom_range(0, q.size() - 1)].al + $urandom_range(0, 1)) % AL_SIZE;
        rb_start = 1; rb_al_head = AW'(head_al); rb_br_idx = AW'(br);
        brage = (br - head_al + AL_SIZE) % AL_SIZE;
        younger = 0;
        foreach (q[i]) if ((q[i].al - head_al + AL_SIZE) % AL_SIZE > brage) younger++;
        next_al = q[q.size() - 1 - younger].al;  // later indices restart after the branch
        // expected: exactly the youngest `younger` entries go, one per cycle
        n_rb++;
        fork begin
          int y;
          y = younger;
          @(posedge clk); #2;
          for (int c = 0; c < y; c++) begin
            check(busy, "busy during walk");
            @(posedge clk); #2;
          end
          check(!busy, "busy ends after the walk");
        end join_none
      end else begin
        int n;
        n = 0;
        for (int k = 0; k < WIDTH; k++)
          if (1'($urandom) && q.size() + n - (pop ? 1 : 0) < SIZE && n < int'(free_cnt)) begin
            e_t e;
            next_al = (next_al + $urandom_range(1, 3)) % AL_SIZE;
            e.al = next_al; e.pc = {$urandom, $urandom}; e.vt = $urandom_range(0, 2);
            e.pred = $urandom_range(0, 3); e.used = 1'($urandom); e.counted = 1'($urandom); e.act = 0;
            al_valid[k] = 1; al_al_idx[k] = AW'(e.al); al_pc[k] = e.pc; al_vtype[k] = 2'(e.vt);
            al_pred[k] = e.pred; al_used[k] = e.used; al_counted[k] = e.counted;
            q.push_back(e);
            n++;
          end
      end
      // writebacks to distinct live entries
      if (!squash)
        for (int k = 0; k < WIDTH; k++)
          if (old_n > 0 && q.size() > 0 && 1'($urandom)) begin
            int i;
            bit dup;
            i = $urandom_range(0, (old_n < q.size() ? old_n : q.size()) - 1);
            dup = 0;
            for (int j = 0; j < k; j++) if (wb_valid[j] && int'(wb_al_idx[j]) == q[i].al) dup = 1;
            if (!dup) begin
              wb_valid[k] = 1; wb_al_idx[k] = AW'(q[i].al); wb_value[k] = $urandom_range(0, 3);
            end
          end
      #1;
      for (int k = 0; k < WIDTH; k++)
        if (wb_valid[k]) begin
          int i;
          i = -1;
          foreach (q[j]) if (q[j].al == int'(wb_al_idx[k])) i = j;
          if (i >= 0) begin
            check(wb_match[k], "wb_match");
            check(wb_misp[k] == (q[i].used && q[i].pred != wb_value[k]), "wb_misp");
            if (wb_misp[k]) n_misp++;
            if (!squash) q[i].act = wb_value[k];
          end
        end
      if (pop) void'(q.pop_front());
      if (squash) q.delete();
    end
    check(n_rb > 0 && n_walk > 0 && n_misp > 0 && n_full > 0, "coverage");
    $display("rollbacks=%0d walked=%0d misp=%0d full=%0d", n_rb, n_walk, n_misp, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
