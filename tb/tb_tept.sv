// tb_tept: random lookups and inserts on a 256-entry table from a pool of
// 400 PCs, so that the table fills and entries are evicted. A reference
// model (tag/mask arrays and a tree pseudo-LRU written with explicit
// left/right indices) predicts every lookup result and every eviction.
module tb_tept;
  localparam int N = 256, P = 11, PCW = 32, LV = 8, POOL = 400;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [PCW-1:0] lk_pc = '0, ins_pc = '0;
  logic lk_hit, ins_valid = 1'b0, full, evict;
  logic [P-1:0] lk_mask;
  logic [3:0] ins_stage = '0;
  int checks = 0, failures = 0, evictions = 0, hits = 0;

  tept #(.ENTRIES(N), .PCW(PCW), .P(P)) dut (.clk, .rst_n, .lk_pc, .lk_hit, .lk_mask,
    .ins_valid, .ins_pc, .ins_stage, .full, .evict);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit           rv [N];
  int unsigned  rt [N];
  int unsigned  rm [N];
  bit           tree [N];   // node 1..N-1

  function automatic int find(int unsigned pc);
    for (int i = 0; i < N; i++) if (rv[i] && rt[i] == pc) return i;
    return -1;
  endfunction

  function automatic void touch(int leaf);
    int node = leaf + N;
    while (node > 1) begin
      int parent = node / 2;
      // point the parent at the sibling of the touched child
      tree[parent] = (node == 2 * parent) ? 1'b1 : 1'b0;
      node = parent;
    end
  endfunction

  function automatic int victim();
    int node = 1;
    for (int l = 0; l < LV; l++) node = tree[node] ? 2 * node + 1 : 2 * node;
    return node - N;
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    bit exp_evict;
    exp_evict = 1'b0;
    for (int i = 0; i < N; i++) begin rv[i] = 0; tree[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 6000; c++) begin
      int k, victim_i;
      lk_pc     = 32'h1000 + 4 * ($urandom % POOL);
      ins_valid = ($urandom % 3) == 0;
      ins_pc    = 32'h1000 + 4 * ($urandom % POOL);
      ins_stage = 4'($urandom % P);
      #1;
      k = find(lk_pc);
      chk("lk_hit", int'(lk_hit), int'(k >= 0));
      chk("lk_mask", int'(lk_mask), k >= 0 ? int'(rm[k]) : 0);
      chk("evict", int'(evict), int'(exp_evict));
      if (k >= 0) hits++;
      chk("full", int'(full), int'(find_free() < 0));
      // reference update, in the order the table applies it
      victim_i = victim();
      if (k >= 0) touch(k);
      exp_evict = 1'b0;
      if (ins_valid) begin
        int h, f;
        h = find(ins_pc);
        f = find_free();
        if (h >= 0) begin
          rm[h] |= (1 << ins_stage);
          touch(h);
        end else begin
          int e;
          e = (f >= 0) ? f : victim_i;
          exp_evict = (f < 0);
          rv[e] = 1; rt[e] = ins_pc; rm[e] = (1 << ins_stage);
          touch(e);
        end
      end
      @(posedge clk);
      #1;
      if (exp_evict) evictions++;
    end
    chk("evictions happened", int'(evictions > 20), 1);
    chk("hits happened", int'(hits > 100), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int find_free();
    for (int i = 0; i < N; i++) if (!rv[i]) return i;
    return -1;
  endfunction
endmodule
