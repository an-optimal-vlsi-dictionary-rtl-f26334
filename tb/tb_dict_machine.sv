// tb_dict_machine: end-to-end test of the hypercube dictionary machine at its default size
// (D = 7, 128 processors).
//
// A stream of random instructions is offered on the valid/ready port. A reference model
// (a sorted associative array) applies every instruction when it is accepted and predicts
// each Search answer, each Find Min answer and each overflow. The test checks:
//   * every answer's key, v and r, and its latency (2*D+4 cycles for Search, 1 for Find Min);
//   * the snake contents against the reference after each phase (sorted, no gaps);
//   * the embedding: the snake visits every processor once along hypercube edges with
//     broadcast distances of neighbours at most 3 apart (Delta = 3), and no link ever carries
//     both snake and broadcast traffic;
//   * that each mechanism of the design happened at least once: duplicate insertion, absent
//     deletion, overflow, a deletion that shifts records up, Extract Min, Find Min on an
//     empty dictionary, found and missed Searches, Searches one cycle apart, and the three
//     kinds of stall (token spacing, update after Search, Search after update).
module tb_dict_machine;
  import dict_pkg::*;

  localparam int D   = 7;            // the top's default
  localparam int N   = 1 << D;
  localparam int SLAT = 2 * D + 5;   // acceptance-to-observation, Search
  localparam int FLAT = 2;           // acceptance-to-observation, Find Min

  logic   clk = 0;
  logic   rst_n = 0;
  logic   in_valid = 0;
  logic   in_ready;
  instr_t in_i = '0;
  rmsg_t  srch_o, fm_o;
  logic   overflow_o;
  rec_t   cells [N];

  dict_machine dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_i, .srch_o, .fm_o, .overflow_o, .cells_o(cells)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;

  // ---------------------------------------------------------------- reference model
  data_t ref_m [key_t];
  typedef struct { longint t; key_t key; logic found; data_t data; } exp_t;
  exp_t sq [$];   // expected Search answers
  exp_t fq [$];   // expected Find Min answers
  int exp_ovf = 0, got_ovf = 0;

  // mechanism counters
  int n_dup = 0, n_absent_del = 0, n_ovf = 0, n_shift_del = 0, n_xmin = 0, n_fm_empty = 0;
  int n_hit = 0, n_miss = 0, n_b2b = 0, n_st_tok = 0, n_st_us = 0, n_st_su = 0;
  longint last_srch = -10, last_tok = -100, last_srch_acc = -100;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  function automatic void model(input instr_t ins, input longint t);
    key_t k;
    exp_t e;
    case (ins.op)
      OP_INSERT: begin
        if (ref_m.exists(ins.key)) n_dup++;
        else begin
          ref_m[ins.key] = ins.data;
          if (ref_m.num() > N) begin
            void'(ref_m.last(k));
            ref_m.delete(k);
            exp_ovf++;
            n_ovf++;
          end
        end
      end
      OP_DELETE: begin
        if (!ref_m.exists(ins.key)) n_absent_del++;
        else begin
          k = ins.key;
          if (ref_m.next(k)) n_shift_del++;
          ref_m.delete(ins.key);
        end
      end
      OP_XMIN: begin
        if (ref_m.first(k)) begin ref_m.delete(k); n_xmin++; end
      end
      OP_SEARCH: begin
        e.t = t; e.key = ins.key;
        e.found = ref_m.exists(ins.key);
        e.data = e.found ? ref_m[ins.key] : '0;
        if (e.found) n_hit++; else n_miss++;
        if (last_srch == t - 1) n_b2b++;
        last_srch = t;
        sq.push_back(e);
      end
      OP_FINDMIN: begin
        e.t = t;
        e.found = ref_m.first(k);
        e.key = e.found ? k : '0;
        e.data = e.found ? ref_m[k] : '0;
        if (!e.found) n_fm_empty++;
        fq.push_back(e);
      end
      default: ;
    endcase
  endfunction

  // ---------------------------------------------------------------- monitor
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready) begin
      model(in_i, cyc);
      if (in_i.op inside {OP_INSERT, OP_DELETE, OP_XMIN}) last_tok = cyc;
      if (in_i.op == OP_SEARCH) last_srch_acc = cyc;
    end
    if (in_valid && !in_ready) begin
      if (in_i.op == OP_SEARCH) n_st_su++;
      else if (cyc - last_tok < 2) n_st_tok++;
      else n_st_us++;
    end
    if (srch_o.valid) begin
      exp_t e;
      if (sq.size() == 0) check(0, "unexpected Search answer");
      else begin
        e = sq.pop_front();
        check(srch_o.key == e.key && srch_o.found == e.found &&
              (!e.found || srch_o.data == e.data),
              $sformatf("Search(%0d): got v=%0d r=%0d, want v=%0d r=%0d",
                        e.key, srch_o.found, srch_o.data, e.found, e.data));
        check(cyc - e.t == SLAT, $sformatf("Search latency %0d", cyc - e.t));
      end
    end
    if (fm_o.valid) begin
      exp_t e;
      if (fq.size() == 0) check(0, "unexpected Find Min answer");
      else begin
        e = fq.pop_front();
        check(fm_o.found == e.found && (!e.found || (fm_o.key == e.key && fm_o.data == e.data)),
              $sformatf("FindMin: got %0d/%0d want %0d/%0d", fm_o.found, fm_o.key,
                        e.found, e.key));
        check(cyc - e.t == FLAT, $sformatf("Find Min latency %0d", cyc - e.t));
      end
    end
    if (overflow_o) got_ovf++;
  end

  // ---------------------------------------------------------------- driver
  // Called at a falling edge; returns at the falling edge after the instruction was taken,
  // still driving it, so that the next call can follow in the very next cycle.
  task automatic issue(input op_e op, input key_t key, input data_t data);
    in_valid = 1;
    in_i = '{op: op, key: key, data: data};
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
  endtask

  task automatic idle(input int n);
    in_valid = 0;
    repeat (n) @(negedge clk);
  endtask

  task automatic check_cells(input string tag);
    key_t k;
    int p;
    bit more;
    p = 0;
    more = ref_m.first(k);
    for (int i = 0; i < N; i++) begin
      if (more) begin
        check(cells[i].valid && cells[i].key == k && cells[i].data == ref_m[k],
              $sformatf("%s: cell %0d holds %0d/%0d, want %0d", tag, i, cells[i].valid,
                        cells[i].key, k));
        more = ref_m.next(k);
      end else begin
        check(!cells[i].valid, $sformatf("%s: cell %0d should be empty", tag, i));
      end
    end
  endtask

  function automatic key_t rkey(input int range_);
    return key_t'($urandom_range(range_ - 1));
  endfunction

  task automatic random_ops(input int n, input int range_, input int pins, input int pdel,
                            input int psrch, input int pfm);
    int r;
    for (int i = 0; i < n; i++) begin
      r = $urandom_range(99);
      if (r < pins) issue(OP_INSERT, rkey(range_), data_t'($urandom));
      else if (r < pins + pdel) issue(OP_DELETE, rkey(range_), '0);
      else if (r < pins + pdel + psrch) issue(OP_SEARCH, rkey(range_), '0);
      else if (r < pins + pdel + psrch + pfm) issue(OP_FINDMIN, '0, '0);
      else issue(OP_XMIN, '0, '0);
    end
  endtask

  // Update right after a Search and Search right after an update, on the key at the head of
  // the snake (compared last by the Search) and on a key at the tail (changed last).
  task automatic hazards();
    key_t k, kmax;
    for (int j = 0; j < 8; j++) begin
      if (ref_m.first(k)) begin
        issue(OP_SEARCH, k, '0);
        issue(OP_XMIN, '0, '0);
        issue(OP_SEARCH, k, '0);
        issue(OP_INSERT, k, data_t'(j));
        issue(OP_SEARCH, k, '0);
        issue(OP_DELETE, k, '0);
        issue(OP_SEARCH, k, '0);
      end
    end
    // fill to N-1 records, then work at the tail
    while (ref_m.num() < N - 1) begin
      void'(ref_m.last(kmax));
      issue(OP_INSERT, kmax + key_t'(1 + $urandom_range(3)), data_t'($urandom));
    end
    for (int j = 0; j < 6; j++) begin
      void'(ref_m.last(kmax));
      k = kmax + 1;
      issue(OP_INSERT, k, data_t'(j + 7));
      issue(OP_SEARCH, k, '0);
      issue(OP_DELETE, k, '0);
      issue(OP_SEARCH, k, '0);
    end
    in_valid = 0;
  endtask

  // ---------------------------------------------------------------- embedding checks
  // broadcast distance inside a sub-hypercube, written out from the drawing
  localparam int BD [16] = '{0, 3, 1, 4, 1, 4, 4, 5, 1, 2, 2, 5, 2, 3, 3, 4};
  int n_link_conflict = 0;

  task automatic check_embedding();
    bit seen [N];
    int maxdelta, x;
    maxdelta = 0;
    for (int s = 0; s < N; s++) begin
      check(!seen[snake_node(s)], $sformatf("snake visits processor %0d twice", snake_node(s)));
      seen[snake_node(s)] = 1;
      if (s > 0) begin
        x = snake_node(s) ^ snake_node(s - 1);
        check(x != 0 && (x & (x - 1)) == 0,
              $sformatf("snake positions %0d and %0d are not hypercube neighbours", s - 1, s));
        // global broadcast reaches all roots at once, so the distance difference is local
        x = BD[snake_node(s) & 15] - BD[snake_node(s - 1) & 15];
        if (x < 0) x = -x;
        if (x > maxdelta) maxdelta = x;
      end
    end
    check(snake_node(0) == 0, "snake head is not processor 0");
    check(maxdelta == 3, $sformatf("Delta = %0d, want 3", maxdelta));
  endtask

  // no link may carry snake and broadcast traffic, even at different times
  bit used_snake [N][D], used_bc [N][D];
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++)
      for (int b = 0; b < D; b++) begin
        if (dut.lnk[i][b].tok.kind != TK_NONE || dut.lnk[i][b].up.valid) used_snake[i][b] = 1;
        if (dut.lnk[i][b].fwd.valid || dut.lnk[i][b].rev.valid) used_bc[i][b] = 1;
      end
  end

  task automatic check_disjoint();
    int ns, nb;
    ns = 0; nb = 0;
    for (int i = 0; i < N; i++)
      for (int b = 0; b < D; b++) begin
        bit sn, bc;
        sn = used_snake[i][b] || used_snake[i ^ (1 << b)][b];
        bc = used_bc[i][b] || used_bc[i ^ (1 << b)][b];
        if (sn) ns++;
        if (bc) nb++;
        if (sn && bc) n_link_conflict++;
      end
    check(n_link_conflict == 0, $sformatf("%0d links carried both snake and broadcast traffic",
                                          n_link_conflict));
    check(ns > 0 && nb > 0, "link usage not observed");
    $display("links used (both directions counted): snake %0d, broadcast %0d, shared %0d",
             ns, nb, n_link_conflict);
  endtask

  initial begin
    check_embedding();
    $display("tb_dict_machine: D=%0d N=%0d", D, N);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // empty machine
    issue(OP_FINDMIN, '0, '0);
    issue(OP_SEARCH, 16'd5, '0);
    issue(OP_XMIN, '0, '0);
    issue(OP_DELETE, 16'd7, '0);
    // fill past capacity: inserts, duplicates, overflow
    for (int i = 0; i < N + 20; i++) issue(OP_INSERT, rkey(4 * N), data_t'($urandom));
    idle(N + 10);
    check_cells("after fill");
    // a burst of Searches one cycle apart
    for (int i = 0; i < 40; i++) issue(OP_SEARCH, rkey(4 * N), '0);
    // mixed traffic
    random_ops(1500, 3 * N, 35, 25, 20, 10);
    idle(N + 10);
    check_cells("after mixed");
    // hazards: Searches and updates on the same key, each issued as early as allowed
    hazards();
    idle(N + 10);
    check_cells("after hazards");
    // deletions and Extract Min dominate: drain toward empty
    random_ops(600, 3 * N, 10, 30, 15, 10);
    for (int i = 0; i < N + 4; i++) issue(OP_XMIN, '0, '0);
    issue(OP_FINDMIN, '0, '0);
    idle(2 * D + 10 + N);
    check_cells("after drain");

    check_disjoint();
    check(sq.size() == 0, "Search answers missing");
    check(fq.size() == 0, "Find Min answers missing");
    check(got_ovf == exp_ovf, $sformatf("overflow pulses %0d, want %0d", got_ovf, exp_ovf));
    $display("mechanisms: dup=%0d absent_del=%0d ovf=%0d shift_del=%0d xmin=%0d fm_empty=%0d",
             n_dup, n_absent_del, n_ovf, n_shift_del, n_xmin, n_fm_empty);
    $display("            hit=%0d miss=%0d back_to_back=%0d stall_tok=%0d stall_us=%0d stall_su=%0d",
             n_hit, n_miss, n_b2b, n_st_tok, n_st_us, n_st_su);
    check(n_dup > 0, "no duplicate insertion");
    check(n_absent_del > 0, "no deletion of an absent key");
    check(n_ovf > 0, "no overflow");
    check(n_shift_del > 0, "no deletion with shift");
    check(n_xmin > 0, "no Extract Min");
    check(n_fm_empty > 0, "no Find Min on empty dictionary");
    check(n_hit > 0 && n_miss > 0, "Search hit and miss not both seen");
    check(n_b2b > 0, "no back-to-back Searches");
    check(n_st_tok > 0 && n_st_us > 0 && n_st_su > 0, "a stall kind never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
