// tb_dict_table1: measures the delay (cycles between accepted instructions in a steady
// stream) and the answer latency of every instruction of the dictionary machine at its
// default size (D = 7, 128 processors), the quantities of the design's performance table:
// O(1) delay for every instruction, O(log n) latency for Search, O(1) for Find Min.
// Expected here: Insert, Delete, Extract Min 2 cycles apart; Search and Find Min 1 cycle
// apart; Search answer 2*D+4 = 18 cycles and Find Min answer 1 cycle after acceptance.
// Each stream runs on its own (after the machine has settled), answers are checked against
// the keys inserted.
module tb_dict_table1;
  import dict_pkg::*;

  localparam int D = 7;
  localparam int N = 1 << D;
  localparam int L = 64;      // instructions per stream

  logic   clk = 0, rst_n = 0;
  logic   in_valid = 0, in_ready;
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
  longint acc_t [$];                 // acceptance cycles of the current stream
  longint s_acc [$], f_acc [$];      // pending Search / Find Min acceptances
  key_t   s_key [$];
  bit     present [key_t];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready) begin
      acc_t.push_back(cyc);
      if (in_i.op == OP_SEARCH) begin s_acc.push_back(cyc); s_key.push_back(in_i.key); end
      if (in_i.op == OP_FINDMIN) f_acc.push_back(cyc);
    end
    if (srch_o.valid) begin
      longint t;
      key_t k;
      t = s_acc.pop_front();
      k = s_key.pop_front();
      check(cyc - t - 1 == 2 * D + 4, $sformatf("Search latency %0d", cyc - t - 1));
      check(srch_o.key == k && srch_o.found == present.exists(k) &&
            (!srch_o.found || srch_o.data == data_t'(k * 3)), $sformatf("Search(%0d)", k));
    end
    if (fm_o.valid) begin
      longint t;
      t = f_acc.pop_front();
      check(cyc - t - 1 == 1, $sformatf("Find Min latency %0d", cyc - t - 1));
    end
  end

  task automatic stream(input op_e op, input int n, input int key0, input int step,
                        input int period, input string name);
    acc_t.delete();
    for (int j = 0; j < n; j++) begin
      key_t k;
      k = key_t'(key0 + j * step);
      in_valid = 1;
      in_i = '{op: op, key: k, data: data_t'(k * 3)};
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      if (op == OP_INSERT) present[k] = 1;
      if (op == OP_DELETE && present.exists(k)) present.delete(k);
    end
    in_valid = 0;
    @(negedge clk);
    check(acc_t.size() == n, $sformatf("%s: %0d accepted", name, acc_t.size()));
    for (int j = 1; j < acc_t.size(); j++)
      check(acc_t[j] - acc_t[j-1] == period,
            $sformatf("%s: delay %0d want %0d", name, acc_t[j] - acc_t[j-1], period));
    $display("%-12s %0d instructions in %0d cycles (delay %0d)", name, n,
             acc_t[acc_t.size()-1] - acc_t[0] + 1, period);
    repeat (N + 4 * D) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    stream(OP_INSERT,  L, 1000, -7, 2, "Insert");
    stream(OP_SEARCH,  L,  552,  7, 1, "Search");   // about half hit
    stream(OP_FINDMIN, L,    0,  0, 1, "Find Min");
    stream(OP_DELETE,  L / 2, 1000, -14, 2, "Delete");
    stream(OP_XMIN,    L / 4,    0,  0, 2, "Extract Min");
    check(s_acc.size() == 0 && f_acc.size() == 0, "answers missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
