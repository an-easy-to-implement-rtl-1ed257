// tb_request_gen: directed test of the compare-merge request generation of
// one input port (the X- input of router (1,1) in a 4 x 4 torus).
// Checks: adaptive routing to the productive port with most credit; the
// blockage timer (blocked exactly TH_BLOCK cycles after adaptive credit ran
// out, then a request for the DOR escape port and escape buffer); refusal of
// an out-of-ring escape entry while the downstream buffer is the bubble and
// acceptance of an in-ring one; recovery of adaptive routing when credit
// returns; the priority blocked-adaptive > escape > unblocked-adaptive; the
// escape-to-adaptive switch-back only above TH_BACK credits; ejection.
module tb_request_gen;
  import ffc_pkg::*;
  localparam int unsigned TH_BLOCK = 16;
  localparam int V = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  flit_t [NUM_VC-1:0] adp_head, esc_head;
  logic  [NUM_VC-1:0] adp_valid, esc_valid, adp_granted;
  logic  [3:0][ACNT_W-1:0] cc_adp;
  logic  [3:0][NUM_VC-1:0][ECNT_W-1:0] cc_esc;
  logic  [3:0][NUM_VC-1:0] bubble_busy;
  logic  [NUM_VC-1:0] req_valid, req_to_esc, req_from_esc, blocked, esc_to_adp;
  port_e [NUM_VC-1:0] req_out;
  logic  [NUM_VC-1:0][LEN_W-1:0] req_len;

  request_gen #(.PORT_ID(1), .K(4), .TH_BLOCK(TH_BLOCK), .TH_BACK(MAX_PKT)) dut (
    .clk, .rst_n, .my_x(3'd1), .my_y(3'd1),
    .adp_head, .adp_valid, .esc_head, .esc_valid, .cc_adp, .cc_esc, .bubble_busy,
    .adp_granted, .req_valid, .req_out, .req_to_esc, .req_from_esc, .req_len,
    .blocked, .esc_to_adp);

  int checks = 0, failures = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (valid=%0d out=%0d esc=%0d from_esc=%0d)",
                                          what, req_valid[V], req_out[V], req_to_esc[V],
                                          req_from_esc[V]); end
  endtask

  function automatic flit_t mk(int x, int y, int len);
    flit_t f;
    f = '0; f.head = 1; f.tail = (len == 1); f.dx = 3'(x); f.dy = 3'(y); f.len = 4'(len);
    return f;
  endfunction

  initial begin
    adp_head = '0; esc_head = '0; adp_valid = '0; esc_valid = '0; adp_granted = '0;
    cc_esc = '0; bubble_busy = '0;
    for (int p = 0; p < 4; p++) begin
      cc_adp[p] = 20;
      for (int v = 0; v < NUM_VC; v++) cc_esc[p][v] = ESC_DEPTH;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // adaptive packet to (3,1): X distance 2 = K/2, both X directions minimal
    @(negedge clk);
    adp_head[V] = mk(3, 1, 6); adp_valid[V] = 1;
    cc_adp[P_XM] = 30;
    #1;
    chk(req_valid[V] && req_out[V] == P_XM && !req_to_esc[V] && !req_from_esc[V] &&
        req_len[V] == 6, "adaptive request to port with most credit");

    // adaptive credit too small for the packet: wait, then escape
    cc_adp[P_XP] = 5; cc_adp[P_XM] = 5;
    for (int c = 0; c < TH_BLOCK; c++) begin
      #1;
      chk(!req_valid[V] && !blocked[V], "no request while waiting");
      @(negedge clk);
    end
    #1;
    chk(blocked[V], "blocked after TH_BLOCK cycles");
    chk(req_valid[V] && req_out[V] == P_XP && req_to_esc[V] && !req_from_esc[V],
        "blocked packet requests DOR escape port");
    // the escape buffer behind X+ is the bubble: out-of-ring entry refused
    bubble_busy[P_XP][V] = 1; #1;
    chk(!req_valid[V], "out-of-ring entry into the bubble refused");
    bubble_busy[P_XP][V] = 0;
    cc_esc[P_XP][V] = 5; #1;
    chk(!req_valid[V], "escape entry needs room for the whole packet");
    cc_esc[P_XP][V] = ESC_DEPTH;

    // blocked adaptive has priority over an escape packet
    esc_head[V] = mk(1, 3, 3); esc_valid[V] = 1; #1;
    chk(req_valid[V] && !req_from_esc[V] && req_to_esc[V], "blocked adaptive beats escape");

    // adaptive credit returns: adaptive routing resumes, escape packet now first
    @(negedge clk);
    cc_adp[P_XP] = 8; #1;
    chk(!blocked[V], "unblocked when adaptive credit is back");
    chk(req_valid[V] && req_from_esc[V], "escape beats unblocked adaptive");
    // escape packet to (1,3): Y distance 2; adaptive credit 12 is not above TH_BACK
    cc_adp[P_YP] = 12; cc_adp[P_YM] = 12; #1;
    chk(req_valid[V] && req_from_esc[V] && req_to_esc[V] && req_out[V] == P_YP,
        "escape packet stays on DOR port at threshold");
    cc_adp[P_YM] = 13; #1;
    chk(req_valid[V] && req_from_esc[V] && !req_to_esc[V] && req_out[V] == P_YM && esc_to_adp[V],
        "escape packet returns to adaptive above threshold");
    cc_adp[P_YM] = 12;
    // turning from X- input into the Y ring is out-of-ring
    bubble_busy[P_YP][V] = 1; #1;
    chk(req_valid[V] && !req_from_esc[V] && req_out[V] == P_XP && !req_to_esc[V],
        "escape turn into bubble refused, adaptive served instead");
    bubble_busy[P_YP][V] = 0;

    // in-ring escape: from X- input continuing X- to (0,1), allowed into the bubble
    esc_head[V] = mk(0, 1, 4);
    bubble_busy[P_XM][V] = 1;
    cc_adp[P_XM] = 0; #1;
    chk(req_valid[V] && req_from_esc[V] && req_to_esc[V] && req_out[V] == P_XM,
        "in-ring escape may use the bubble");
    cc_esc[P_XM][V] = 3; #1;
    chk(!(req_valid[V] && req_from_esc[V]), "in-ring escape needs room for the packet");

    // ejection
    esc_valid[V] = 0;
    adp_head[V] = mk(1, 1, 2); #1;
    chk(req_valid[V] && req_out[V] == P_LOC, "local packet ejects");
    // other VCs stay silent
    chk(req_valid[0] == 0 && req_valid[1] == 0 && req_valid[3] == 0, "idle VCs");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
