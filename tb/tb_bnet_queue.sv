// tb_bnet_queue: the global broadcast tree of a hypercube with D = 6 (four sub-hypercubes),
// i.e. the queues of the four roots 0, 16, 32, 48 linked across dimensions 4 and 5.
// The testbench stands in for each sub-hypercube: it returns an answer a fixed 3 cycles
// after that root started its broadcast, with v = 1 only in sub-hypercube (key mod 4).
// Checks: all roots start the sub-hypercube broadcast in the same cycle, D-4 cycles after
// processor 0 received the Search; the merged answer reaches result_o D-4 cycles after the
// sub-hypercube answers, with the record of the sub-hypercube that found it; Searches may
// follow each other every cycle.
module tb_bnet_queue;
  import dict_pkg::*;

  localparam int D = 6;
  localparam int R = 4;        // roots
  localparam int SUBLAT = 3;

  logic  clk = 0, rst_n = 0;
  smsg_t io = '0;
  smsg_t fo [R][D], fi [R][D];
  rmsg_t ro [R][D], ri [R][D];
  smsg_t root [R];
  rmsg_t rrv [R];
  rmsg_t res [R];

  always #5 clk = ~clk;

  for (genvar i = 0; i < R; i++) begin : g_r
    for (genvar b = 0; b < D; b++) begin : g_w
      if (b >= 4) begin : g_g
        assign fi[i][b] = fo[i ^ (1 << (b - 4))][b];
        assign ri[i][b] = ro[i ^ (1 << (b - 4))][b];
      end else begin : g_l
        assign fi[i][b] = '0;
        assign ri[i][b] = '0;
      end
    end
    bnet_queue #(.D(D), .ID(16 * i)) u_q (
      .clk, .rst_n, .io_i(i == 0 ? io : '0), .fwd_i(fi[i]), .fwd_o(fo[i]), .root_o(root[i]),
      .root_rv_i(rrv[i]), .rev_i(ri[i]), .rev_o(ro[i]), .result_o(res[i])
    );
    // model of the sub-hypercube: answer SUBLAT cycles after its broadcast started
    smsg_t dl [SUBLAT];
    always_ff @(posedge clk) begin
      dl[0] <= root[i];
      for (int s = 1; s < SUBLAT; s++) dl[s] <= dl[s-1];
    end
    always_comb begin
      rrv[i] = '0;
      rrv[i].valid = dl[SUBLAT-1].valid;
      rrv[i].key   = dl[SUBLAT-1].key;
      rrv[i].found = dl[SUBLAT-1].valid && (dl[SUBLAT-1].key % 4 == i);
      rrv[i].data  = rrv[i].found ? data_t'(dl[SUBLAT-1].key + 1000 * i) : '0;
    end
  end

  int checks = 0, failures = 0;
  int cyc = 0;
  int it [$];
  key_t ik [$];
  int n_res = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    foreach (it[j]) begin
      if (cyc == it[j] + (D - 4))
        for (int i = 0; i < R; i++)
          check(root[i].valid && root[i].key == ik[j],
                $sformatf("root %0d start for key %0d", i, ik[j]));
      if (cyc == it[j] + 2 * (D - 4) + SUBLAT) begin
        check(res[0].valid && res[0].key == ik[j] && res[0].found &&
              res[0].data == data_t'(ik[j] + 1000 * (ik[j] % 4)),
              $sformatf("answer for %0d: v=%0d r=%0d", ik[j], res[0].found, res[0].data));
        n_res++;
      end
    end
    // a root never starts a broadcast outside the expected cycles
    for (int i = 0; i < R; i++)
      if (root[i].valid) begin
        bit ok;
        ok = 0;
        foreach (it[j]) if (cyc == it[j] + (D - 4)) ok = 1;
        check(ok, $sformatf("root %0d started at an unexpected cycle", i));
      end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int j = 0; j < 24; j++) begin
      io = '{valid: 1'b1, key: key_t'(200 + j)};
      it.push_back(cyc);
      ik.push_back(key_t'(200 + j));
      @(negedge clk);
      io = '0;
      if (j >= 12) repeat ($urandom_range(2)) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    check(n_res == 24, "answers missing");
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
