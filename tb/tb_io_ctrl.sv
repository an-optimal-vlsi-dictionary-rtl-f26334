// tb_io_ctrl: the instruction controller on its own (D = 7, so a Search must wait
// 117 cycles after a snake token and an update 7+7 = 14 cycles after a Search; 117 is the
// largest of s + t - 12 over snake positions s below the tail, t being the broadcast
// distance of the processor there, reached at s = 125 and 126 where t = 4 and 3).
// Inputs are changed just after a falling edge and in_ready is read 1 time unit later.
// Checks the token or Search message produced for each instruction and its one-cycle timing,
// the Find Min answer taken from the head record, and the exact number of cycles each kind of
// instruction is held back: tokens two cycles apart, Searches every cycle, update after
// Search, Search after update, Find Min after a token.
module tb_io_ctrl;
  import dict_pkg::*;

  localparam int D = 7;
  localparam int US = D + 7;
  localparam int SU = 117;

  logic   clk = 0, rst_n = 0;
  logic   in_valid = 0, in_ready;
  instr_t in_i = '0;
  tok_t   tok;
  smsg_t  srch;
  rec_t   head = '0;
  rmsg_t  fm;

  io_ctrl #(.D(D)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_i, .tok_o(tok), .srch_o(srch),
    .head_rec_i(head), .fm_o(fm)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // Offer an instruction at a falling edge; return the number of cycles it was held back.
  // Returns at the falling edge after acceptance, with the instruction withdrawn.
  task automatic offer(input op_e op, input key_t key, output int waited);
    in_valid = 1;
    in_i = '{op: op, key: key, data: data_t'(key + 1)};
    #1;
    waited = 0;
    while (!in_ready) begin @(negedge clk); #1; waited++; end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int w;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Insert: token next cycle
    offer(OP_INSERT, 16'd42, w);
    check(w == 0, "first insert held back");
    check(tok.kind == TK_INS && tok.key == 42 && tok.data == 43, "insert token");
    // back-to-back update: held one cycle (the call above already spent one)
    offer(OP_DELETE, 16'd7, w);
    check(w == 1, $sformatf("delete right after insert waited %0d", w));
    check(tok.kind == TK_DEL && tok.key == 7, "delete token");
    in_valid = 1; in_i = '{op: OP_XMIN, key: '0, data: '0};
    #1;
    check(!in_ready, "token right after token must wait");
    @(negedge clk);
    #1;
    check(in_ready, "token two cycles after token");
    @(negedge clk);
    in_valid = 0;
    check(tok.kind == TK_XMIN, "extract-min token");
    // Find Min after a token: two cycles apart as well
    offer(OP_FINDMIN, '0, w);
    check(w == 1, "find min right after a token waits one cycle");
    head = '{valid: 1'b1, key: 16'd3, data: 16'd33};
    check(fm.valid == 0, "find min answer too early");
    @(negedge clk);
    check(fm.valid && fm.found && fm.key == 3 && fm.data == 33, "find min answer");
    @(negedge clk);
    check(!fm.valid, "find min answer lasts one cycle");
    // Search after the last token: waits until SU cycles have passed
    offer(OP_SEARCH, 16'd9, w);
    check(w == SU - 5, $sformatf("search waited %0d want %0d", w, SU - 5));
    check(srch.valid && srch.key == 9, "search message");
    // Searches back to back
    for (int j = 0; j < 5; j++) begin
      in_valid = 1; in_i = '{op: OP_SEARCH, key: key_t'(j), data: '0};
      #1;
      check(in_ready, "search after search");
      @(negedge clk);
      check(srch.valid && srch.key == key_t'(j), "pipelined search message");
    end
    in_valid = 0;
    // update after the last Search: waits US cycles
    offer(OP_INSERT, 16'd1, w);
    check(w == US - 1, $sformatf("update after search waited %0d want %0d", w, US - 1));
    // Find Min is not held back by a Search
    offer(OP_SEARCH, '0, w);
    check(w == SU - 1, $sformatf("search waited %0d want %0d", w, SU - 1));
    offer(OP_FINDMIN, '0, w);
    check(w == 0, "find min after search");
    head = '0;
    @(negedge clk);
    check(fm.valid && !fm.found, "find min on empty dictionary");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
