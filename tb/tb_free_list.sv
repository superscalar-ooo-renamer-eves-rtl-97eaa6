// tb_free_list: self-checking test of the free list.
//
// A queue model tracks the free registers in order. Random cycles pop up to
// WIDTH registers, push back registers that were handed out earlier, take a
// checkpoint of the head, restore it (the registers popped since then return
// to the front of the list) and rebuild the list from a random committed map
// (the unused registers in ascending order, list full). Every cycle the
// visible head registers and the free count are compared with the model.
module tb_free_list;
  localparam int N_PHYS = 320, N_LOG = 64, WIDTH = 4;
  localparam int FL_SIZE = N_PHYS - N_LOG;
  localparam int PW = $clog2(N_PHYS), FW = $clog2(FL_SIZE), CW = $clog2(WIDTH + 1);

  logic clk = 0, rst_n = 0;
  logic [CW-1:0] pop_n = 0, push_n = 0;
  logic [WIDTH-1:0][PW-1:0] head_regs, push_regs = '0;
  logic [$clog2(FL_SIZE+1)-1:0] free_cnt;
  logic restore_en = 0, restore_phase = 0, rebuild_en = 0;
  logic [FW-1:0] restore_head = 0, head;
  logic head_phase;
  logic [N_LOG-1:0][PW-1:0] amt_map = '0;

  free_list #(.N_PHYS(N_PHYS), .N_LOG(N_LOG), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned fq[$];      // free registers, front = head
  int unsigned out[$];     // handed-out registers
  int unsigned since[$];   // popped since the checkpoint
  logic ck_valid = 0;
  logic [FW-1:0] ck_head;
  logic ck_phase;
  int n_restore = 0, n_rebuild = 0, n_full = 0, n_empty = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic compare();
    check(int'(free_cnt) == fq.size(), $sformatf("free_cnt %0d vs %0d", free_cnt, fq.size()));
    for (int k = 0; k < WIDTH; k++)
      if (k < fq.size()) check(int'(head_regs[k]) == fq[k], $sformatf("head_regs[%0d]", k));
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < FL_SIZE; s++) fq.push_back(N_LOG + s);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int r, np, nu;
      r = $urandom_range(0, 99);
      pop_n = 0; push_n = 0; restore_en = 0; rebuild_en = 0;
      if (r < 2) begin
        // rebuild from a random committed map of N_LOG distinct registers
        int unsigned perm[$];
        bit used[N_PHYS];
        perm.delete();
        for (int p = 0; p < N_PHYS; p++) perm.push_back(p);
        perm.shuffle();
        foreach (used[p]) used[p] = 0;
        for (int l = 0; l < N_LOG; l++) begin
          amt_map[l] = PW'(perm[l]);
          used[perm[l]] = 1;
        end
        rebuild_en = 1;
        fq.delete(); out.delete(); since.delete(); ck_valid = 0;
        for (int p = 0; p < N_PHYS; p++) if (!used[p]) fq.push_back(p);
        n_rebuild++;
      end else if (r < 6 && ck_valid) begin
        restore_en = 1; restore_head = ck_head; restore_phase = ck_phase;
        while (since.size() > 0) begin
          int unsigned x;
          x = since.pop_back();
          fq.push_front(x);
          foreach (out[i]) if (out[i] == x) begin out.delete(i); break; end
        end
        ck_valid = 0;
        n_restore++;
      end else begin
        if (r < 15) begin
          ck_valid = 1; ck_head = head; ck_phase = head_phase; since.delete();
        end
        np = $urandom_range(0, WIDTH);
        if (np > fq.size()) np = fq.size();
        // push only registers handed out before the checkpoint
        nu = $urandom_range(0, WIDTH);
        if (nu > out.size() - since.size()) nu = out.size() - since.size();
        pop_n = CW'(np); push_n = CW'(nu);
        for (int k = 0; k < nu; k++) begin
          push_regs[k] = PW'(out[0]);
          out.delete(0);
        end
        for (int k = 0; k < np; k++) begin
          int unsigned x;
          x = fq.pop_front();
          out.push_back(x);
          since.push_back(x);
        end
        for (int k = 0; k < nu; k++) fq.push_back(push_regs[k]);
      end
      @(posedge clk);
      @(negedge clk);
      compare();
      if (fq.size() == 0) n_empty++;
      if (fq.size() == FL_SIZE) n_full++;
    end
    check(n_restore > 0 && n_rebuild > 0 && n_full > 0, "coverage restore/rebuild/full");
    $display("restores=%0d rebuilds=%0d full=%0d empty=%0d", n_restore, n_rebuild, n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
