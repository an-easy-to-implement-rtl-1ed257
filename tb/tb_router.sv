// tb_router: one FFC-CR router (node (1,1) of a 4 x 4 torus) between models
// of its neighbours.
//
// Upstream models on all five inputs send random packets (random destination,
// VC, length, target buffer) under credit control, using the credits and
// bubble bits the router returns. Downstream models on the four network
// outputs take flits and give the credits back after a random delay; they
// stall for long stretches, so adaptive packets block and escape. At set
// times a downstream model asserts the bubble bit of a VC.
//
// Checks: every packet leaves whole and in order on a legal port (local port
// for this node, a minimal direction when routed adaptively, the
// dimension-order port when written into an escape buffer); every bubble
// given to an output comes back upstream on the matching input exactly once;
// credit conservation after draining (all adaptive and escape credits of
// every input returned, including those held back during bubble swaps).
module tb_router;
  import ffc_pkg::*;
  localparam int K = 4, MX = 1, MY = 1, NP = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  link_t [NP-1:0] in_link, out_link;
  cred_t [NP-1:0] in_cred, out_cred;
  ev_t ev;

  router #(.K(K), .X(MX), .Y(MY), .BUBBLE_INIT(4'b0000), .TH_BLOCK(8)) dut (.*);

  int checks = 0, failures = 0;
  task automatic fail(string s); failures++; $display("FAIL %s", s); endtask

  // ---------- upstream models ----------
  int up_adp [NP];
  int up_esc [NP][NUM_VC];
  bit tx_busy [NP];
  int tx_len [NP], tx_idx [NP], tx_vc [NP], tx_dst [NP], tx_id [NP];
  bit tx_esc [NP];
  int pkts_left [NP];
  int bubbles_back [4][NUM_VC];
  int next_id = 0;

  // ---------- downstream models ----------
  int ds_owed_adp [4];
  int ds_owed_esc [4][NUM_VC];
  int stall [4];
  bit give_bubble [4][NUM_VC];
  int bubbles_given [4][NUM_VC];

  // ---------- packet tracking ----------
  typedef struct { int dst; int len; bit esc; } info_t;
  info_t info [int];
  int rx_id [NP], rx_idx [NP];
  bit rx_busy [NP];
  int delivered = 0, injected = 0;
  int n_escape = 0, n_swap = 0, n_hold = 0;

  function automatic bit minimal(int o, int d);
    int fx, fy;
    fx = ((d % K) - MX + K) % K;
    fy = ((d / K) - MY + K) % K;
    case (o)
      0: return fx != 0 && 2 * fx <= K;
      1: return fx != 0 && 2 * fx >= K;
      2: return fy != 0 && 2 * fy <= K;
      3: return fy != 0 && 2 * fy >= K;
      default: return 0;
    endcase
  endfunction

  function automatic int dor(int d);
    for (int o = 0; o < 4; o++) if (minimal(o, d)) return o;
    return 4;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (ev.escape) n_escape++;
    if (ev.swap)   n_swap++;
    if (ev.hold)   n_hold++;
    // credits back to the upstream models
    for (int p = 0; p < NP; p++) begin
      if (out_cred[p].adp) up_adp[p]++;
      for (int v = 0; v < NUM_VC; v++) begin
        up_esc[p][v] += int'(out_cred[p].esc[v]);
        if (p < 4 && out_cred[p].bubble[v]) bubbles_back[p][v]++;
      end
    end
    // outputs
    for (int o = 0; o < NP; o++) begin
      if (out_link[o].valid) begin
        flit_t f;
        int id;
        f = out_link[o].flit;
        id = int'(f.data[23:0]);
        checks++;
        if (!info.exists(id)) begin fail("unknown packet"); continue; end
        if (!rx_busy[o]) begin
          if (!f.head) fail("packet does not start with head");
          rx_busy[o] = 1; rx_id[o] = id; rx_idx[o] = 0;
          if (o == 4 ? (info[id].dst != MY * K + MX) :
              (out_link[o].esc ? (o != dor(info[id].dst)) : !minimal(o, info[id].dst)))
            fail($sformatf("packet to %0d left on port %0d esc=%0d", info[id].dst, o,
                           out_link[o].esc));
        end else begin
          rx_idx[o]++;
          if (id != rx_id[o] || f.head) fail("flits interleaved");
        end
        if (int'(f.data[27:24]) != rx_idx[o]) fail("flit order");
        if (o < 4) begin
          if (out_link[o].esc) ds_owed_esc[o][out_link[o].vc]++;
          else ds_owed_adp[o]++;
        end
        if (f.tail) begin
          rx_busy[o] = 0;
          if (rx_idx[o] + 1 != info[id].len) fail("length");
          info.delete(id);
          delivered++;
        end
      end
    end
  end

  // downstream credit return and upstream injection (drive at negedge)
  always @(negedge clk) if (rst_n) begin
    for (int o = 0; o < 4; o++) begin
      in_cred[o] = '0;
      if (stall[o] > 0) stall[o]--;
      else if ($urandom_range(200) == 0) stall[o] = $urandom_range(150, 20);
      if (stall[o] == 0) begin
        if (ds_owed_adp[o] > 0 && $urandom_range(1)) begin in_cred[o].adp = 1; ds_owed_adp[o]--; end
        for (int v = 0; v < NUM_VC; v++)
          if (ds_owed_esc[o][v] > 0 && $urandom_range(1)) begin
            in_cred[o].esc[v] = 1; ds_owed_esc[o][v]--;
          end
      end
      for (int v = 0; v < NUM_VC; v++)
        if (give_bubble[o][v]) begin
          in_cred[o].bubble[v] = 1; give_bubble[o][v] = 0; bubbles_given[o][v]++;
        end
    end
    for (int p = 0; p < NP; p++) begin
      in_link[p] = '0;
      if (!tx_busy[p] && pkts_left[p] > 0) begin
        tx_dst[p] = $urandom_range(K * K - 1);
        tx_len[p] = $urandom_range(MAX_PKT, 1);
        tx_vc[p]  = $urandom_range(NUM_VC - 1);
        // escape entry needs room for the whole packet upstream
        tx_esc[p] = $urandom_range(2) == 0 && up_esc[p][tx_vc[p]] >= tx_len[p];
        tx_idx[p] = 0; tx_id[p] = next_id++;
        tx_busy[p] = 1; pkts_left[p]--;
      end
      if (tx_busy[p] && (tx_esc[p] ? up_esc[p][tx_vc[p]] > 0 : up_adp[p] > 0)) begin
        in_link[p].valid = 1;
        in_link[p].esc   = tx_esc[p];
        in_link[p].vc    = VC_W'(tx_vc[p]);
        in_link[p].flit.head = tx_idx[p] == 0;
        in_link[p].flit.tail = tx_idx[p] == tx_len[p] - 1;
        in_link[p].flit.dx   = COORD_W'(tx_dst[p] % K);
        in_link[p].flit.dy   = COORD_W'(tx_dst[p] / K);
        in_link[p].flit.len  = LEN_W'(tx_len[p]);
        in_link[p].flit.data = {4'(tx_idx[p]), 24'(tx_id[p])};
        if (tx_idx[p] == 0) begin
          info_t i;
          i.dst = tx_dst[p]; i.len = tx_len[p]; i.esc = tx_esc[p];
          info[tx_id[p]] = i; injected++;
        end
        if (tx_esc[p]) up_esc[p][tx_vc[p]]--; else up_adp[p]--;
        tx_idx[p]++;
        if (tx_idx[p] == tx_len[p]) tx_busy[p] = 0;
      end
    end
  end

  initial begin
    in_link = '0; in_cred = '0;
    for (int p = 0; p < NP; p++) begin
      up_adp[p] = ADP_DEPTH; tx_busy[p] = 0; pkts_left[p] = 0; rx_busy[p] = 0;
      for (int v = 0; v < NUM_VC; v++) up_esc[p][v] = ESC_DEPTH;
    end
    for (int o = 0; o < 4; o++) begin
      ds_owed_adp[o] = 0; stall[o] = 0;
      for (int v = 0; v < NUM_VC; v++) begin
        ds_owed_esc[o][v] = 0; give_bubble[o][v] = 0; bubbles_given[o][v] = 0;
        bubbles_back[o][v] = 0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++) pkts_left[p] = 150;
    for (int t = 0; t < 8; t++) begin
      repeat (300) @(posedge clk);
      @(negedge clk);
      give_bubble[t % 4][(t / 2) % NUM_VC] = 1;
    end
    while (delivered < injected || pkts_left.sum() > 0 || tx_busy.or()) @(posedge clk);
    // let the last credits return
    for (int o = 0; o < 4; o++) stall[o] = 0;
    repeat (200) @(posedge clk);
    $display("delivered %0d packets, escapes %0d, swaps %0d, held credits %0d",
             delivered, n_escape, n_swap, n_hold);
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (up_adp[p] != ADP_DEPTH) fail($sformatf("input %0d adaptive credits %0d", p, up_adp[p]));
      for (int v = 0; v < NUM_VC; v++) begin
        checks++;
        if (up_esc[p][v] != ESC_DEPTH)
          fail($sformatf("input %0d VC %0d escape credits %0d", p, v, up_esc[p][v]));
        if (p < 4) begin
          checks++;
          if (bubbles_back[p][v] != bubbles_given[p][v])
            fail($sformatf("port %0d VC %0d bubbles %0d given %0d back", p, v,
                           bubbles_given[p][v], bubbles_back[p][v]));
        end
      end
    end
    checks++;
    if (n_escape == 0 || n_hold == 0) fail("no escape or no held credit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    fail($sformatf("watchdog: %0d of %0d delivered", delivered, injected));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
