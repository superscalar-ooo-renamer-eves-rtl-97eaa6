// tb_svp: self-checking test of the stride value predictor.
//
// Part 1 (directed): one instruction retires values 100, 107, 114, ...; the
// entry is allocated by the first, learns the stride from the second and must
// reach the confident value 31 after exactly 31 further correct trainings.
// With three instances in flight the prediction must be
// last + (3 + 1) * stride. A wrong value resets the counter to 0.
// Part 2 (random): a model of the table (tag, counter, last value, stride,
// instance count) follows random lookups, allocations, trainings (with and
// without the increment permission), undos and squashes over a few PCs that
// share table indices; hit, value and counter of every lookup and the training
// hit are compared each cycle.
module tb_svp;
  localparam int ENTRIES = 256, WIDTH = 4, XLEN = 64, PC_BITS = 64, CONF_BITS = 5;
  localparam int TAG_BITS = 12, INST_BITS = 8, IW = $clog2(ENTRIES);

  logic clk = 0, rst_n = 0;
  logic [WIDTH-1:0] pr_valid = 0, pr_hit, pr_alloc = 0;
  logic [WIDTH-1:0][PC_BITS-1:0] pr_pc = '0;
  logic [WIDTH-1:0][XLEN-1:0] pr_value;
  logic [WIDTH-1:0][CONF_BITS-1:0] pr_conf;
  logic tr_valid = 0, tr_inc_en = 0, tr_counted = 0, tr_hit, un_valid = 0, squash = 0;
  logic [PC_BITS-1:0] tr_pc = '0, un_pc = '0;
  logic [XLEN-1:0] tr_value = '0;

  svp #(.ENTRIES(ENTRIES), .WIDTH(WIDTH), .XLEN(XLEN), .PC_BITS(PC_BITS),
        .CONF_BITS(CONF_BITS), .TAG_BITS(TAG_BITS), .INST_BITS(INST_BITS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // model
  bit              m_vld [ENTRIES];
  longint unsigned m_tag [ENTRIES], m_rv [ENTRIES], m_st [ENTRIES];
  int              m_conf [ENTRIES], m_inst [ENTRIES];

  function automatic int ix(input longint unsigned pc); return int'((pc >> 2) % ENTRIES); endfunction
  function automatic longint unsigned tg(input longint unsigned pc);
    return (pc >> (2 + IW)) % (64'd1 << TAG_BITS);
  endfunction
  function automatic bit mhit(input longint unsigned pc);
    return m_vld[ix(pc)] && m_tag[ix(pc)] == tg(pc);
  endfunction

  task automatic train(input longint unsigned pc, input longint unsigned v, input bit inc);
    tr_valid = 1; tr_pc = pc; tr_value = v; tr_inc_en = inc; tr_counted = 1;
    @(posedge clk); #1;
    tr_valid = 0;
  endtask

  longint unsigned pcs[6] = '{64'h1000, 64'h1004, 64'h1000 + (ENTRIES * 4), 64'h2008,
                              64'h200c, 64'h1004 + (ENTRIES * 8)};

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
    // ---------------- part 1
    train(64'h4000, 100, 1);
    train(64'h4000, 107, 1);                       // learns stride 7, counter reset
    for (int i = 0; i < 30; i++) train(64'h4000, 114 + 7 * i, 1);
    pr_valid[0] = 1; pr_pc[0] = 64'h4000; #1;
    check(pr_hit[0] && pr_conf[0] == 30, "counter 30 after 30 correct");
    train(64'h4000, 114 + 7 * 30, 1);
    #1 check(pr_conf[0] == 31, "confident after 31 correct");
    check(pr_value[0] == 114 + 7 * 31, "prediction last+stride");
    // three instances in flight
    pr_alloc[0] = 1; @(posedge clk); @(posedge clk); @(posedge clk); #1;
    pr_alloc[0] = 0; #1;
    check(pr_value[0] == 114 + 7 * 30 + 4 * 7, "prediction with 3 in flight");
    // same PC in two slots: the second sees one more instance
    pr_valid[1] = 1; pr_pc[1] = 64'h4000; pr_alloc[0] = 1; #1;
    check(pr_value[1] == pr_value[0] + 7, "in-bundle instance");
    pr_alloc[0] = 0; pr_valid = 0;
    squash = 1; @(posedge clk); #1 squash = 0;
    train(64'h4000, 5, 1);
    pr_valid[0] = 1; #1;
    check(pr_conf[0] == 0, "counter reset on wrong value");
    check(pr_value[0] == 5 + (5 - (114 + 7 * 30)), "new stride after wrong value");
    pr_valid = 0;
    // ---------------- part 2
    for (int e = 0; e < ENTRIES; e++) begin m_vld[e] = 0; m_inst[e] = 0; end
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int cnt [ENTRIES];
      @(negedge clk);
      squash = ($urandom_range(0, 299) == 0);
      for (int k = 0; k < WIDTH; k++) begin
        pr_valid[k] = 1'($urandom); pr_pc[k] = pcs[$urandom_range(0, 5)]; pr_alloc[k] = pr_valid[k] && 1'($urandom);
      end
      tr_valid = 1'($urandom); tr_pc = pcs[$urandom_range(0, 5)]; tr_inc_en = 1'($urandom);
      tr_counted = 1'($urandom);
      if (mhit(tr_pc) && $urandom_range(0, 3) != 0) tr_value = m_rv[ix(tr_pc)] + m_st[ix(tr_pc)];
      else tr_value = $urandom_range(0, 20);
      un_valid = ($urandom_range(0, 3) == 0); un_pc = pcs[$urandom_range(0, 5)];
      #1;
      // compare predictions
      for (int e = 0; e < ENTRIES; e++) cnt[e] = m_inst[e];
      for (int k = 0; k < WIDTH; k++) begin
        bit h;
        int i;
        i = ix(pr_pc[k]);
        h = pr_valid[k] && mhit(pr_pc[k]);
        check(pr_hit[k] == h, "random hit");
        if (h) begin
          check(pr_conf[k] == m_conf[i], "random conf");
          check(pr_value[k] == m_rv[i] + longint'(cnt[i] + 1) * m_st[i], "random value");
          if (pr_alloc[k]) cnt[i]++;
        end
      end
      check(tr_hit == (tr_valid && mhit(tr_pc)), "train hit");
      // model update
      for (int e = 0; e < ENTRIES; e++) begin
        int c;
        c = squash ? 0 : cnt[e];
        if (!squash) begin
          if (tr_valid && mhit(tr_pc) && tr_counted && ix(tr_pc) == e && c > 0) c--;
          if (un_valid && mhit(un_pc) && ix(un_pc) == e && c > 0) c--;
        end
        if (c > 255) c = 255;
        if (tr_valid && !mhit(tr_pc) && ix(tr_pc) == e) c = 0;
        m_inst[e] = c;
      end
      if (tr_valid) begin
        int i;
        i = ix(tr_pc);
        if (mhit(tr_pc)) begin
          if (tr_value == m_rv[i] + m_st[i]) begin
            if (tr_inc_en && m_conf[i] != 31) m_conf[i]++;
          end else m_conf[i] = 0;
          m_st[i] = tr_value - m_rv[i];
          m_rv[i] = tr_value;
        end else begin
          m_vld[i] = 1; m_tag[i] = tg(tr_pc); m_conf[i] = 0; m_rv[i] = tr_value; m_st[i] = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
