// tb_hc_pe: processor 0 of a D = 5 hypercube on its own, its five neighbours played by the
// testbench. Processor 0 is the snake head, a sub-hypercube root and the I/O processor.
// Checks that snake traffic uses only dimension 0 (toward 0001, its snake successor), that
// the Search message leaves on dimension 4 (the global tree) one cycle after entry and on
// dimensions 1, 2, 3 (its children in G1) one cycle later, that answers arriving from those
// children and from the 5-neighbour are merged with the processor's own record, and that no
// link ever carries both kinds of traffic, and that the head never hands its record up.
module tb_hc_pe;
  import dict_pkg::*;

  localparam int D = 5;

  logic  clk = 0, rst_n = 0;
  link_t li [D], lo [D];
  tok_t  tok = '0;
  smsg_t srch = '0;
  rec_t  rec;
  logic  hole, ovf;
  rmsg_t res;

  hc_pe #(.D(D), .ID(0)) dut (
    .clk, .rst_n, .link_i(li), .link_o(lo), .tok_i(tok), .srch_i(srch), .rec_o(rec),
    .hole_o(hole), .result_o(res), .overflow_o(ovf)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // edge-disjointness on every cycle
  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < D; b++) begin
      if (b != 0) check(lo[b].tok.kind == TK_NONE && !lo[b].up.valid,
                        $sformatf("snake traffic on dimension %0d", b));
      if (b == 0) check(!lo[b].fwd.valid && !lo[b].rev.valid, "broadcast traffic on the snake link");
      // processor 0 is the snake head: it has no predecessor to hand its record to
      check(!lo[b].up.valid, $sformatf("head record sent across dimension %0d", b));
    end
  end

  function automatic rmsg_t ans(input key_t k, input bit f, input data_t d);
    return '{valid: 1'b1, key: k, found: f, data: f ? d : '0};
  endfunction

  initial begin
    for (int b = 0; b < D; b++) li[b] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // snake: two inserts, the second displaces the first to the successor
    tok = '{kind: TK_INS, key: 16'd50, data: 16'd500};
    @(negedge clk);
    tok = '0;
    check(rec.valid && rec.key == 50 && rec.data == 500, "insert at head");
    @(negedge clk);
    tok = '{kind: TK_INS, key: 16'd20, data: 16'd200};
    @(negedge clk);
    tok = '0;
    check(rec.key == 20 && lo[0].tok.kind == TK_INS && lo[0].tok.key == 50,
          "displaced record sent to the successor");
    @(negedge clk);
    // delete the head: record handed up by the successor over dimension 0
    tok = '{kind: TK_DEL, key: 16'd20, data: '0};
    @(negedge clk);
    tok = '0;
    check(hole && lo[0].tok.kind == TK_SHIFT, "delete opens a hole");
    li[0].up = '{valid: 1'b1, key: 16'd50, data: 16'd500};
    @(negedge clk);
    li[0].up = '0;
    check(!hole && rec.valid && rec.key == 50, "head refilled from successor");
    @(negedge clk);

    // Search 50: own record matches
    srch = '{valid: 1'b1, key: 16'd50};
    @(negedge clk);
    srch = '0;
    check(lo[4].fwd.valid && lo[4].fwd.key == 50, "message on the global dimension");
    for (int b = 1; b < 4; b++) check(!lo[b].fwd.valid, "local broadcast too early");
    @(negedge clk);
    for (int b = 1; b < 4; b++)
      check(lo[b].fwd.valid && lo[b].fwd.key == 50, $sformatf("message to G1 child %0d", b));
    check(!lo[4].fwd.valid, "global message lasts one cycle");
    // children answer (not found) at distance-1 time; fake times are fine for a unit test
    for (int b = 1; b < 4; b++) li[b].rev = ans(16'd50, 1'b0, '0);
    @(negedge clk);
    for (int b = 1; b < 4; b++) li[b].rev = '0;
    li[4].rev = ans(16'd50, 1'b0, '0);   // 5-neighbour's sub-hypercube answer
    @(negedge clk);
    li[4].rev = '0;
    check(res.valid && res.key == 50 && res.found && res.data == 500, "own record found");

    // Search 77: found by the child across dimension 2
    srch = '{valid: 1'b1, key: 16'd77};
    @(negedge clk);
    srch = '0;
    @(negedge clk);
    for (int b = 1; b < 4; b++) li[b].rev = ans(16'd77, b == 2, 16'd777);
    @(negedge clk);
    for (int b = 1; b < 4; b++) li[b].rev = '0;
    li[4].rev = ans(16'd77, 1'b0, '0);
    @(negedge clk);
    li[4].rev = '0;
    check(res.valid && res.found && res.data == 777, "record found in the sub-hypercube");

    // Search 88: found in the other sub-hypercube (5-neighbour)
    srch = '{valid: 1'b1, key: 16'd88};
    @(negedge clk);
    srch = '0;
    @(negedge clk);
    for (int b = 1; b < 4; b++) li[b].rev = ans(16'd88, 1'b0, '0);
    @(negedge clk);
    for (int b = 1; b < 4; b++) li[b].rev = '0;
    li[4].rev = ans(16'd88, 1'b1, 16'd888);
    @(negedge clk);
    li[4].rev = '0;
    check(res.valid && res.found && res.data == 888, "record found across dimension 4");

    // Search 99: nowhere
    srch = '{valid: 1'b1, key: 16'd99};
    @(negedge clk);
    srch = '0;
    @(negedge clk);
    for (int b = 1; b < 4; b++) li[b].rev = ans(16'd99, 1'b0, '0);
    @(negedge clk);
    for (int b = 1; b < 4; b++) li[b].rev = '0;
    li[4].rev = ans(16'd99, 1'b0, '0);
    @(negedge clk);
    li[4].rev = '0;
    check(res.valid && !res.found, "negative answer");
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
