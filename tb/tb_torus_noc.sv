// tb_torus_noc: end-to-end test of the K x K FFC-CR torus at its default size.
//
// Phase 1 sends single packets through the idle network and checks the head
// latency: one cycle per hop plus two (injection buffer write, ejection).
// Phase 2 runs three synthetic traffic patterns back to back at full
// injection load: uniform, hotspot (half of the packets go to the first third
// of the nodes) and exponential (destination distance geometrically
// distributed). Every node injects PKTS packets per pattern with random VC
// and random length 1..MAX_PKT, then the network must drain completely: a
// packet left behind means a deadlock or a lost flit.
//
// Every delivered flit is checked against a scoreboard: right destination,
// packet delivered once, flits contiguous and in order, length and head/tail
// marks intact. The event strobes of all routers are counted, and each FFC-CR
// mechanism (bubble swap, credit held in Ca, escape of a blocked packet,
// return from escape to adaptive, in-ring escape forwarding, escape ring
// entry) must have happened at least once.
module tb_torus_noc;
  import ffc_pkg::*;

  localparam int unsigned K    = 4;
  localparam int unsigned N    = K * K;
  localparam int unsigned PKTS = 250;
  localparam int unsigned WATCHDOG = 400000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  link_t [N-1:0] inj_link;
  cred_t [N-1:0] inj_cred;
  link_t [N-1:0] ej_link;
  ev_t   [N-1:0] ev;

  torus_noc dut (.clk, .rst_n, .inj_link, .inj_cred, .ej_link, .ev);

  int checks = 0, failures = 0;
  int unsigned cycle = 0;

  // ---------------- scoreboard ----------------
  typedef struct packed {
    logic [5:0] dst;
    logic [3:0] len;
    logic [1:0] vc;
    int unsigned t_inj;
  } pkt_info_t;
  pkt_info_t sb [int];         // key: src*65536 + seq
  int outstanding = 0;
  int delivered = 0;

  // per ejection port: packet in progress
  int  rx_key [N];
  int  rx_idx [N];
  bit  rx_busy [N];
  int  last_latency;

  // ---------------- sources ----------------
  int  mode = 0;               // 0 uniform, 1 hotspot, 2 exponential, 3 single
  int  pkts_left [N];
  bit  tx_busy [N];
  int  tx_key [N], tx_idx [N], tx_len [N];
  int  tx_dst [N], tx_vc [N];
  int  tx_seq [N];
  int  adp_cr [N];
  int  single_src = -1, single_dst = 0, single_len = 1;

  function automatic int hops(int s, int d);
    int dx, dy;
    dx = ((d % K) - (s % K) + K) % K;
    dy = ((d / K) - (s / K) + K) % K;
    if (dx > K / 2) dx = K - dx;
    if (dy > K / 2) dy = K - dy;
    return dx + dy;
  endfunction

  function automatic int pick_dst(int s);
    int d, g;
    case (mode)
      1: begin
        if ($urandom_range(1) == 0) d = $urandom_range(N / 3 - 1);
        else d = $urandom_range(N - 1);
      end
      2: begin
        g = 0;
        while ($urandom_range(2) != 0 && g < N - 2) g++;
        d = (s + 1 + g) % N;
      end
      default: d = $urandom_range(N - 1);
    endcase
    if (d == s) d = (s + 1) % N;
    return d;
  endfunction

  // event counters
  int n_swap = 0, n_hold = 0, n_escape = 0, n_back = 0, n_ring = 0, n_enter = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < N; n++) begin
        inj_link[n] <= '0;
        tx_busy[n]  = 1'b0;
        rx_busy[n]  = 1'b0;
        adp_cr[n]   = ADP_DEPTH;
        tx_seq[n]   = 0;
        pkts_left[n] = 0;
      end
    end else begin
      cycle++;
      for (int n = 0; n < N; n++) begin
        // events
        if (ev[n].swap)       n_swap++;
        if (ev[n].hold)       n_hold++;
        if (ev[n].escape)     n_escape++;
        if (ev[n].esc_back)   n_back++;
        if (ev[n].ring_fwd)   n_ring++;
        if (ev[n].ring_enter) n_enter++;

        // credits back from the router
        if (inj_cred[n].adp) adp_cr[n]++;

        // ---- ejection check ----
        if (ej_link[n].valid) begin
          flit_t f;
          int key, idx;
          f   = ej_link[n].flit;
          key = int'(f.data[31:26]) * 65536 + int'(f.data[25:12]);
          idx = int'(f.data[11:8]);
          checks++;
          if (f.dx != COORD_W'(n % K) || f.dy != COORD_W'(n / K)) begin
            failures++;
            $display("FAIL node %0d got flit for (%0d,%0d)", n, f.dx, f.dy);
          end
          if (!rx_busy[n]) begin
            if (!f.head || !sb.exists(key) || idx != 0) begin
              failures++;
              $display("FAIL node %0d: unexpected flit key=%0d head=%0d idx=%0d", n, key, f.head, idx);
            end else begin
              rx_busy[n] = 1'b1;
              rx_key[n]  = key;
              rx_idx[n]  = 0;
              last_latency = int'(cycle - sb[key].t_inj);
            end
          end else begin
            rx_idx[n]++;
            if (key != rx_key[n] || idx != rx_idx[n] || f.head) begin
              failures++;
              $display("FAIL node %0d: flit out of order key=%0d/%0d idx=%0d/%0d",
                       n, key, rx_key[n], idx, rx_idx[n]);
            end
          end
          if (rx_busy[n] && f.tail) begin
            rx_busy[n] = 1'b0;
            checks++;
            if (sb.exists(rx_key[n])) begin
              if (int'(sb[rx_key[n]].len) != rx_idx[n] + 1 || int'(f.len) != rx_idx[n] + 1) begin
                failures++;
                $display("FAIL node %0d: length %0d, expected %0d", n, rx_idx[n] + 1,
                         sb[rx_key[n]].len);
              end
              sb.delete(rx_key[n]);
              outstanding--;
              delivered++;
            end
          end
        end

        // ---- injection ----
        if (!tx_busy[n]) begin
          if (single_src == n) begin
            tx_busy[n] = 1'b1;
            tx_dst[n]  = single_dst;
            tx_len[n]  = single_len;
            tx_vc[n]   = 0;
            single_src = -1;
          end else if (pkts_left[n] > 0) begin
            tx_busy[n] = 1'b1;
            tx_dst[n]  = pick_dst(n);
            tx_len[n]  = $urandom_range(MAX_PKT, 1);
            tx_vc[n]   = $urandom_range(NUM_VC - 1);
            pkts_left[n]--;
          end
          if (tx_busy[n]) begin
            tx_idx[n] = 0;
            tx_key[n] = n * 65536 + tx_seq[n];
            tx_seq[n] = (tx_seq[n] + 1) % 16384;
          end
        end
        inj_link[n] <= '0;
        if (tx_busy[n] && adp_cr[n] > 0) begin
          link_t l;
          l = '0;
          l.valid     = 1'b1;
          l.esc       = 1'b0;
          l.vc        = VC_W'(tx_vc[n]);
          l.flit.head = (tx_idx[n] == 0);
          l.flit.tail = (tx_idx[n] == tx_len[n] - 1);
          l.flit.dx   = COORD_W'(tx_dst[n] % K);
          l.flit.dy   = COORD_W'(tx_dst[n] / K);
          l.flit.len  = LEN_W'(tx_len[n]);
          l.flit.data = {6'(n), 14'(tx_key[n] % 65536), 4'(tx_idx[n]), 8'($urandom_range(255))};
          if (tx_idx[n] == 0) begin
            pkt_info_t pi;
            pi.dst   = 6'(tx_dst[n]);
            pi.len   = 4'(tx_len[n]);
            pi.vc    = 2'(tx_vc[n]);
            pi.t_inj = cycle;
            sb[tx_key[n]] = pi;
            outstanding++;
          end
          inj_link[n] <= l;
          adp_cr[n]--;
          tx_idx[n]++;
          if (tx_idx[n] == tx_len[n]) tx_busy[n] = 1'b0;
        end
      end
    end
  end

  task automatic drain(input string name, input int limit);
    int t;
    t = 0;
    while ((outstanding > 0 || single_src >= 0 || pkts_left.sum() > 0 || tx_busy.or() != 0) && t < limit) begin
      @(posedge clk);
      t++;
    end
    checks++;
    if (outstanding != 0) begin
      failures++;
      $display("FAIL %s: %0d packets not delivered after %0d cycles", name, outstanding, t);
    end else
      $display("%s: drained, %0d packets delivered so far, cycle %0d", name, delivered, cycle);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // phase 1: zero-load latency
    for (int i = 0; i < 8; i++) begin
      int s, d;
      s = $urandom_range(N - 1);
      d = (s + 1 + $urandom_range(N - 2)) % N;
      single_dst = d;
      single_len = 1;
      @(negedge clk);
      single_src = s;
      drain("single", 200);
      checks++;
      if (last_latency != hops(s, d) + 2) begin
        failures++;
        $display("FAIL latency %0d->%0d: %0d cycles, expected %0d", s, d, last_latency,
                 hops(s, d) + 2);
      end
    end

    // phase 2: saturated synthetic traffic
    for (int m = 0; m < 3; m++) begin
      @(negedge clk);
      mode = m;
      for (int n = 0; n < N; n++) pkts_left[n] = PKTS;
      drain(m == 0 ? "uniform" : (m == 1 ? "hotspot" : "exponential"), 200000);
    end

    $display("events: swap=%0d hold=%0d escape=%0d esc_back=%0d ring_fwd=%0d ring_enter=%0d",
             n_swap, n_hold, n_escape, n_back, n_ring, n_enter);
    checks += 6;
    if (n_swap == 0)   begin failures++; $display("FAIL no bubble swap"); end
    if (n_hold == 0)   begin failures++; $display("FAIL no credit held in Ca"); end
    if (n_escape == 0) begin failures++; $display("FAIL no blocked packet escaped"); end
    if (n_back == 0)   begin failures++; $display("FAIL no return to adaptive"); end
    if (n_ring == 0)   begin failures++; $display("FAIL no in-ring escape forward"); end
    if (n_enter == 0)  begin failures++; $display("FAIL no escape ring entry"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
