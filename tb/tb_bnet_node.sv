// tb_bnet_node: the 16 broadcast-net stages of one sub-hypercube (D = 4), linked as a
// 4-cube, each given a snake record by the testbench.
// For a stream of Searches (one per cycle, then spaced out) it checks that each processor
// registers the message exactly at its broadcast distance after the root (the distances of
// the published sub-hypercube drawing, written out below independently of the design), that
// every processor's answer register is loaded 11 - distance cycles after the root, and that
// the root's answer carries v = 1 and the right record exactly when some processor holds the
// key.
module tb_bnet_node;
  import dict_pkg::*;

  localparam int D = 4;
  // distance of processor v (printed next to each node of the sub-hypercube drawing)
  localparam int DIST [16] = '{0, 3, 1, 4, 1, 4, 4, 5, 1, 2, 2, 5, 2, 3, 3, 4};

  logic  clk = 0, rst_n = 0;
  smsg_t root = '0;
  smsg_t fo [16][D];
  rmsg_t ro [16][D];
  smsg_t fi [16][D];
  rmsg_t ri [16][D];
  rec_t  rec [16];
  rmsg_t rv [16];

  always #5 clk = ~clk;

  for (genvar i = 0; i < 16; i++) begin : g_n
    for (genvar b = 0; b < D; b++) begin : g_w
      assign fi[i][b] = fo[i ^ (1 << b)][b];
      assign ri[i][b] = ro[i ^ (1 << b)][b];
    end
    bnet_node #(.D(D), .ID(i)) u_n (
      .clk, .rst_n, .root_i(i == 0 ? root : '0), .fwd_i(fi[i]), .fwd_o(fo[i]),
      .rec_i(rec[i]), .hole_i(1'b0), .rev_i(ri[i]), .rev_o(ro[i]), .rv_o(rv[i])
    );
  end

  int checks = 0, failures = 0;
  int cyc = 0;
  int issue_t [$];
  key_t issue_k [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // message register of processor v: visible on the links to its G1 children, or, for a
  // sink, through its answer one cycle later; track the answer registers instead.
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    foreach (issue_t[j]) begin
      for (int v = 0; v < 16; v++) begin
        // root register loads at issue (edge after root is driven); answer at 11 - dist later
        if (cyc == issue_t[j] + 12 - DIST[v]) begin
          check(rv[v].valid && rv[v].key == issue_k[j],
                $sformatf("node %0d answer timing for key %0d", v, issue_k[j]));
        end
        if (DIST[v] < 5 && cyc == issue_t[j] + 1 + DIST[v]) begin
          bit any;
          any = 0;
          for (int b = 0; b < D; b++) if (fo[v][b].valid && fo[v][b].key == issue_k[j]) any = 1;
          check(any, $sformatf("node %0d message at distance %0d", v, DIST[v]));
        end
      end
      if (cyc == issue_t[j] + 12) begin
        bit f;
        data_t dt;
        f = 0; dt = '0;
        for (int v = 0; v < 16; v++)
          if (rec[v].valid && rec[v].key == issue_k[j]) begin f = 1; dt = rec[v].data; end
        check(rv[0].found == f && (!f || rv[0].data == dt),
              $sformatf("answer for %0d: v=%0d r=%0d want v=%0d r=%0d", issue_k[j],
                        rv[0].found, rv[0].data, f, dt));
      end
    end
  end

  initial begin
    for (int v = 0; v < 16; v++) rec[v] = '{valid: (v != 6), key: key_t'(100 + 3 * v),
                                             data: data_t'(v * 17 + 1)};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // a burst of Searches one per cycle: hits on every processor, and misses
    for (int j = 0; j < 40; j++) begin
      key_t k;
      k = key_t'(100 + j);
      root = '{valid: 1'b1, key: k};
      issue_t.push_back(cyc);
      issue_k.push_back(k);
      @(negedge clk);
    end
    root = '0;
    repeat (20) @(negedge clk);
    // spaced Searches
    for (int j = 0; j < 30; j++) begin
      key_t k;
      k = key_t'(100 + $urandom_range(50));
      root = '{valid: 1'b1, key: k};
      issue_t.push_back(cyc);
      issue_k.push_back(k);
      @(negedge clk);
      root = '0;
      repeat ($urandom_range(3)) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
