// tb_snake_cell: a chain of M snake cells (the last one with IS_LAST) against a sorted
// reference list of capacity M.
// Tokens enter the head two cycles apart. After each random token the chain is given time to
// settle every few tokens and its contents are compared with the reference; directed steps
// first check single-cell behaviour and timing (a token reaches the next cell one cycle
// later, a deleted cell is refilled from its successor in the following cycle).
module tb_snake_cell;
  import dict_pkg::*;

  localparam int M = 8;

  logic clk = 0, rst_n = 0;
  tok_t tok [M+1];
  rec_t rec [M+1];
  logic hole [M];
  logic ovf  [M];

  always #5 clk = ~clk;

  assign rec[M] = '0;
  for (genvar i = 0; i < M; i++) begin : g_c
    snake_cell #(.IS_LAST(i == M - 1)) u_c (
      .clk, .rst_n, .tok_i(tok[i]), .up_i(rec[i+1]), .tok_o(tok[i+1]), .rec_o(rec[i]),
      .hole_o(hole[i]), .overflow_o(ovf[i])
    );
  end

  int checks = 0, failures = 0;
  key_t ref_q [$];   // sorted keys
  int n_ovf_exp = 0, n_ovf_got = 0;

  always @(posedge clk) if (rst_n && ovf[M-1]) n_ovf_got++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic send(input tok_kind_e kind, input key_t key);
    @(negedge clk);
    tok[0] = '{kind: kind, key: key, data: data_t'(key) ^ 16'h5a5a};
    @(negedge clk);
    tok[0] = '{kind: TK_NONE, key: '0, data: '0};
  endtask

  function automatic void model(input tok_kind_e kind, input key_t key);
    int pos;
    case (kind)
      TK_INS: begin
        foreach (ref_q[i]) if (ref_q[i] == key) return;
        pos = 0;
        while (pos < ref_q.size() && ref_q[pos] < key) pos++;
        ref_q.insert(pos, key);
        if (ref_q.size() > M) begin void'(ref_q.pop_back()); n_ovf_exp++; end
      end
      TK_DEL: foreach (ref_q[i]) if (ref_q[i] == key) begin ref_q.delete(i); return; end
      TK_XMIN: if (ref_q.size() > 0) void'(ref_q.pop_front());
      default: ;
    endcase
  endfunction

  task automatic compare(input string tag);
    repeat (M + 2) @(negedge clk);
    for (int i = 0; i < M; i++) begin
      if (i < ref_q.size())
        check(rec[i].valid && rec[i].key == ref_q[i] && rec[i].data == (ref_q[i] ^ 16'h5a5a),
              $sformatf("%s cell %0d: %0d/%0d want %0d", tag, i, rec[i].valid, rec[i].key,
                        ref_q[i]));
      else
        check(!rec[i].valid, $sformatf("%s cell %0d not empty", tag, i));
      check(!hole[i], $sformatf("%s cell %0d still a hole", tag, i));
    end
  endtask

  initial begin
    tok[0] = '{kind: TK_NONE, key: '0, data: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // directed: insert 10 lands in cell 0 one cycle after entering
    @(negedge clk);
    tok[0] = '{kind: TK_INS, key: 16'd10, data: 16'd10 ^ 16'h5a5a};
    @(negedge clk);
    tok[0] = '{kind: TK_NONE, key: '0, data: '0};
    model(TK_INS, 16'd10);
    check(rec[0].valid && rec[0].key == 10, "insert into empty head");
    check(tok[1].kind == TK_NONE, "no token after landing");
    // insert 5: displaces 10, which appears as a token to cell 1 in the same cycle
    tok[0] = '{kind: TK_INS, key: 16'd5, data: 16'd5 ^ 16'h5a5a};
    @(negedge clk);
    tok[0] = '{kind: TK_NONE, key: '0, data: '0};
    model(TK_INS, 16'd5);
    check(rec[0].key == 5 && tok[1].kind == TK_INS && tok[1].key == 10, "displacement");
    @(negedge clk);
    check(rec[1].valid && rec[1].key == 10, "displaced record stored in cell 1");
    // delete 5: head becomes a hole, refilled with 10 one cycle later
    tok[0] = '{kind: TK_DEL, key: 16'd5, data: '0};
    @(negedge clk);
    tok[0] = '{kind: TK_NONE, key: '0, data: '0};
    model(TK_DEL, 16'd5);
    check(hole[0] && tok[1].kind == TK_SHIFT, "hole and shift token");
    @(negedge clk);
    check(!hole[0] && rec[0].valid && rec[0].key == 10, "hole refilled from successor");
    compare("directed");

    // random traffic, tokens two cycles apart
    for (int n = 0; n < 3000; n++) begin
      tok_kind_e kind;
      key_t key;
      int r;
      r = $urandom_range(99);
      kind = (r < 50) ? TK_INS : (r < 85) ? TK_DEL : TK_XMIN;
      key  = key_t'($urandom_range(3 * M));
      send(kind, key);
      model(kind, key);
      if (n % 7 == 6) compare($sformatf("random %0d", n));
    end
    compare("final");
    check(n_ovf_got == n_ovf_exp, $sformatf("overflow %0d want %0d", n_ovf_got, n_ovf_exp));
    check(n_ovf_exp > 0, "overflow never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
