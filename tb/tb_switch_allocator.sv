// tb_switch_allocator: random packet traffic through the allocator of a
// 5-port, 4-VC router. A model holds, per input port, VC and queue
// (adaptive/escape), packets with a random output, target buffer and length;
// flits become readable with random gaps (cut-through). Checks: the head
// leaves in its grant cycle; each output carries whole packets, flits in
// order and never interleaved; the crossbar select, VC and target-buffer
// side band match the packet; no output is driven twice; all packets are
// served (no starvation). A final phase with five inputs aimed at five
// different outputs checks a throughput of five flits per cycle.
module tb_switch_allocator;
  import ffc_pkg::*;
  localparam int NP = 5, NV = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  [NP-1:0][NV-1:0] req_valid, req_to_esc, req_from_esc;
  port_e [NP-1:0][NV-1:0] req_out;
  logic  [NP-1:0][NV-1:0] adp_valid, adp_tail, esc_valid, esc_tail;
  logic  [NP-1:0] rd_en, rd_esc, xb_valid, xb_to_esc, new_grant;
  logic  [NP-1:0][1:0] rd_vc, xb_vc;
  logic  [NP-1:0][2:0] xb_sel;
  logic  [NP-1:0][NV-1:0] grant_adp;

  switch_allocator #(.NP(NP), .NV(NV)) dut (.*);

  typedef struct { int out; bit to_esc; int len; int id; } pkt_t;
  pkt_t q [NP][NV][2][$];
  int   sent [NP][NV][2];        // flits of the head packet already read
  bit   gap [NP][NV][2];
  int   cur_id [NP], cur_idx [NP];
  bit   cur_busy [NP];
  bit   wait_head [NP];            // granted, head not yet readable
  int   checks = 0, failures = 0, delivered = 0, total = 0, next_id = 0;
  bit   fixed_pattern = 0;

  task automatic fail(string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  function automatic void add_pkt(int p, int v, int k, int out, bit to_esc, int len);
    pkt_t pk;
    pk.out = out; pk.to_esc = to_esc; pk.len = len; pk.id = next_id++;
    q[p][v][k].push_back(pk);
    total++;
  endfunction

  // drive the allocator inputs from the model
  always_comb begin
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < NV; v++) begin
        int k;
        k = (q[p][v][1].size() != 0) ? 1 : 0;
        req_valid[p][v]    = (q[p][v][k].size() != 0) && (sent[p][v][k] == 0);
        req_from_esc[p][v] = (k == 1);
        req_out[p][v]      = (q[p][v][k].size() != 0) ? port_e'(q[p][v][k][0].out) : P_LOC;
        req_to_esc[p][v]   = (q[p][v][k].size() != 0) ? q[p][v][k][0].to_esc : 1'b0;
        adp_valid[p][v]    = (q[p][v][0].size() != 0) && !gap[p][v][0];
        esc_valid[p][v]    = (q[p][v][1].size() != 0) && !gap[p][v][1];
        adp_tail[p][v]     = (q[p][v][0].size() != 0) && (sent[p][v][0] == q[p][v][0][0].len - 1);
        esc_tail[p][v]     = (q[p][v][1].size() != 0) && (sent[p][v][1] == q[p][v][1][0].len - 1);
      end
  end

  int flits_this_cycle;
  always @(posedge clk) if (rst_n) begin
    flits_this_cycle = 0;
    for (int o = 0; o < NP; o++) begin
      if (xb_valid[o]) begin
        int p, v, k;
        pkt_t pk;
        p = int'(xb_sel[o]); v = int'(rd_vc[p]); k = rd_esc[p] ? 1 : 0;
        checks++;
        flits_this_cycle++;
        if (!rd_en[p] || q[p][v][k].size() == 0) begin fail("output without read"); continue; end
        pk = q[p][v][k][0];
        if (pk.out != o || pk.to_esc != xb_to_esc[o] || xb_vc[o] != 2'(v))
          fail($sformatf("output %0d carries packet for %0d", o, pk.out));
        if (sent[p][v][k] == 0) begin
          if (cur_busy[o]) fail("packets interleaved on an output");
          if (!new_grant[p] && !wait_head[p]) fail("head left without a grant");
          cur_busy[o] = 1; cur_id[o] = pk.id; cur_idx[o] = 0;
        end else begin
          cur_idx[o]++;
          if (!cur_busy[o] || cur_id[o] != pk.id || cur_idx[o] != sent[p][v][k])
            fail("flit order");
        end
      end
    end
    for (int p = 0; p < NP; p++) begin
      if (new_grant[p] && !rd_en[p] && !gap[p][rd_vc[p]][rd_esc[p] ? 1 : 0])
        fail("head not read in grant cycle");
      if (new_grant[p] && !rd_en[p]) wait_head[p] = 1;
      if (rd_en[p]) wait_head[p] = 0;
      if (rd_en[p]) begin
        int v, k;
        v = int'(rd_vc[p]); k = rd_esc[p] ? 1 : 0;
        sent[p][v][k]++;
        if (sent[p][v][k] == q[p][v][k][0].len) begin
          cur_busy[q[p][v][k][0].out] = 0;
          void'(q[p][v][k].pop_front());
          sent[p][v][k] = 0;
          delivered++;
        end
      end
      for (int v = 0; v < NV; v++) for (int k = 0; k < 2; k++)
        gap[p][v][k] = fixed_pattern ? 1'b0 : ($urandom_range(3) == 0);
    end
  end

  initial begin
    for (int p = 0; p < NP; p++) for (int v = 0; v < NV; v++) for (int k = 0; k < 2; k++) begin
      sent[p][v][k] = 0; gap[p][v][k] = 0;
    end
    for (int o = 0; o < NP; o++) begin cur_busy[o] = 0; wait_head[o] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++)
      add_pkt($urandom_range(NP - 1), $urandom_range(NV - 1), $urandom_range(1),
              $urandom_range(NP - 1), 1'($urandom_range(1)), $urandom_range(MAX_PKT, 1));
    while (delivered < total) @(posedge clk);
    checks++;
    $display("random phase: %0d packets", delivered);

    // throughput: input p to output (p+1)%5, 12-flit packets, no gaps
    @(negedge clk);
    fixed_pattern = 1;
    for (int p = 0; p < NP; p++) for (int v = 0; v < NV; v++) for (int k = 0; k < 2; k++)
      gap[p][v][k] = 0;
    for (int p = 0; p < NP; p++)
      for (int i = 0; i < 4; i++) add_pkt(p, i, 0, (p + 1) % NP, 1'b0, MAX_PKT);
    @(posedge clk); #1;
    for (int c = 0; c < 4 * MAX_PKT; c++) begin
      @(negedge clk);
      checks++;
      if (flits_this_cycle != NP) fail($sformatf("throughput %0d flits/cycle", flits_this_cycle));
    end
    while (delivered < total) @(posedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d of %0d packets", delivered, total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
