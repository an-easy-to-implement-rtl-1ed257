// router: five-port virtual cut-through torus router with full-credit flow
// control and credit reservation (FFC-CR).
//
// Ports 0..3 are the X+, X-, Y+ and Y- links, port 4 the local node. Every
// input port holds, for each of the NUM_VC message-class VCs, a fixed escape
// buffer one bubble deep, plus one adaptive buffer (DAMQ) shared by all VCs.
// A packet is routed adaptively (minimal, most free adaptive credits) while
// it can; an adaptive packet that finds no adaptive credit for TH_BLOCK
// cycles escapes into the deadlock-free escape network (dimension-order
// routing, bubble flow control). An escape packet returns to the adaptive
// network when enough adaptive credit is free. request_gen merges each VC's
// two queue heads into one request; switch_allocator grants whole packets;
// credit_mgmt keeps the downstream credits of each network output and runs
// FFC, which moves a bubble one router backwards only after the local escape
// buffer has emptied, returning the held-back credits in one step.
//
// Interface: in_link[p]/out_link[p] carry one flit per cycle with VC and
// target-buffer side band; out_cred[p] returns credits and bubble bits to the
// router that feeds input p, in_cred[o] brings them from the router behind
// output o. The node interface is the same on port 4; flits delivered on
// out_link[4] are always accepted, and out_cred[4] returns plain credits.
//
// Timing: one cycle per hop. The switch allocation, buffer read and crossbar
// are combinational from registered state, and the flit is written into the
// downstream buffer at the next clock edge; credits reach upstream counters at
// the same edge. The head flit leaves in the cycle its packet is granted.
//
// ESCAPE_ONLY = 1 turns the router into the single-VC FFC router (dimension-
// order routing in the escape buffers only); the default is FFC-CR.
//
// BUBBLE_INIT marks, per network output, that the downstream escape buffers
// start as their ring's bubble (one router per ring must have it set).
module router
  import ffc_pkg::*;
#(
  parameter int unsigned K           = 4,
  parameter int unsigned X           = 0,
  parameter int unsigned Y           = 0,
  parameter logic [3:0]  BUBBLE_INIT = 4'b0000,
  parameter int unsigned TH_BLOCK    = 16,
  parameter int unsigned TH_BACK     = MAX_PKT,
  parameter bit          ESCAPE_ONLY = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  link_t [NUM_PORTS-1:0] in_link,
  output link_t [NUM_PORTS-1:0] out_link,
  input  cred_t [NUM_PORTS-1:0] in_cred,
  output cred_t [NUM_PORTS-1:0] out_cred,
  output ev_t                   ev
);
  localparam int unsigned NP = NUM_PORTS;
  localparam int unsigned NV = NUM_VC;

  // ---------------- input buffers ----------------
  flit_t [NP-1:0][NV-1:0] adp_head, esc_head;
  logic  [NP-1:0][NV-1:0] adp_valid, esc_valid, esc_idle;
  logic  [NP-1:0][NV-1:0] adp_tail, esc_tail;

  logic  [NP-1:0]           rd_en, rd_esc;
  logic  [NP-1:0][VC_W-1:0] rd_vc;

  for (genvar p = 0; p < NP; p++) begin : g_inbuf
    logic [$clog2(ADP_DEPTH+1)-1:0] adp_used;
    damq_buffer #(.DEPTH(ADP_DEPTH), .NQ(NV)) u_adp (
      .clk, .rst_n,
      .wr_en(in_link[p].valid && !in_link[p].esc), .wr_q(in_link[p].vc),
      .wr_flit(in_link[p].flit),
      .rd_en(rd_en[p] && !rd_esc[p]), .rd_q(rd_vc[p]),
      .head_flit(adp_head[p]), .head_valid(adp_valid[p]), .used(adp_used));

    for (genvar v = 0; v < NV; v++) begin : g_esc
      logic [$clog2(ESC_DEPTH+1)-1:0] esc_count;
      escape_buffer #(.DEPTH(ESC_DEPTH)) u_esc (
        .clk, .rst_n,
        .wr_en(in_link[p].valid && in_link[p].esc && (in_link[p].vc == VC_W'(v))),
        .wr_flit(in_link[p].flit),
        .rd_en(rd_en[p] && rd_esc[p] && (rd_vc[p] == VC_W'(v))),
        .rd_flit(esc_head[p][v]), .rd_valid(esc_valid[p][v]),
        .count(esc_count), .idle(esc_idle[p][v]));
      assign adp_tail[p][v] = adp_head[p][v].tail;
      assign esc_tail[p][v] = esc_head[p][v].tail;
    end
  end

  // ---------------- credit management (network outputs) ----------------
  logic  [3:0][ACNT_W-1:0]            cc_adp;
  logic  [3:0][NV-1:0][ECNT_W-1:0]    cc_esc;
  logic  [3:0][NV-1:0]                bubble_busy;
  logic  [3:0][NV-1:0]                swap_done;
  logic  [3:0][NV-1:0][1:0]           cb;
  logic  [NP-1:0]                     xb_valid, xb_to_esc;
  logic  [NP-1:0][$clog2(NP)-1:0]     xb_sel;
  logic  [NP-1:0][VC_W-1:0]           xb_vc;
  logic  [3:0][NV-1:0]                esc_rel;

  for (genvar o = 0; o < 4; o++) begin : g_cm
    logic [NV-1:0][ECNT_W-1:0] ca;
    for (genvar v = 0; v < NV; v++) begin : g_rel
      assign esc_rel[o][v] = rd_en[o] && rd_esc[o] && (rd_vc[o] == VC_W'(v));
    end
    credit_mgmt #(.BUBBLE_INIT(BUBBLE_INIT[o]), .ESC_D(ESC_DEPTH), .ADP_D(ADP_DEPTH)) u_cm (
      .clk, .rst_n,
      .ds_cred(in_cred[o]),
      .send_valid(xb_valid[o]), .send_esc(xb_to_esc[o]), .send_vc(xb_vc[o]),
      .loc_esc_rel(esc_rel[o]), .loc_esc_idle(esc_idle[o]),
      .loc_adp_rel(rd_en[o] && !rd_esc[o]),
      .cc_esc(cc_esc[o]), .cc_adp(cc_adp[o]), .ds_bubble_busy(bubble_busy[o]),
      .up_cred(out_cred[o]), .ca(ca), .cb(cb[o]), .swap_done(swap_done[o]));
  end

  // node side of the injection port: plain credit return
  always_comb begin
    out_cred[P_LOC]     = '0;
    out_cred[P_LOC].adp = rd_en[P_LOC] && !rd_esc[P_LOC];
    for (int v = 0; v < NV; v++)
      out_cred[P_LOC].esc[v] = ECNT_W'(rd_en[P_LOC] && rd_esc[P_LOC] && (rd_vc[P_LOC] == VC_W'(v)));
  end

  // ---------------- request generation ----------------
  logic  [NP-1:0][NV-1:0]             req_valid, req_to_esc, req_from_esc, blocked, esc_to_adp;
  port_e [NP-1:0][NV-1:0]             req_out;
  logic  [NP-1:0][NV-1:0][LEN_W-1:0]  req_len;
  logic  [NP-1:0][NV-1:0]             grant_adp;
  logic  [NP-1:0]                     new_grant;

  for (genvar p = 0; p < NP; p++) begin : g_rg
    request_gen #(.PORT_ID(p), .K(K), .TH_BLOCK(TH_BLOCK), .TH_BACK(TH_BACK),
                  .ESCAPE_ONLY(ESCAPE_ONLY)) u_rg (
      .clk, .rst_n,
      .my_x(COORD_W'(X)), .my_y(COORD_W'(Y)),
      .adp_head(adp_head[p]), .adp_valid(adp_valid[p]),
      .esc_head(esc_head[p]), .esc_valid(esc_valid[p]),
      .cc_adp(cc_adp), .cc_esc(cc_esc), .bubble_busy(bubble_busy),
      .adp_granted(grant_adp[p]),
      .req_valid(req_valid[p]), .req_out(req_out[p]), .req_to_esc(req_to_esc[p]),
      .req_from_esc(req_from_esc[p]), .req_len(req_len[p]),
      .blocked(blocked[p]), .esc_to_adp(esc_to_adp[p]));
  end

  // ---------------- switch allocation and crossbar ----------------
  switch_allocator #(.NP(NP), .NV(NV)) u_sa (
    .clk, .rst_n,
    .req_valid, .req_out, .req_to_esc, .req_from_esc,
    .adp_valid, .adp_tail, .esc_valid, .esc_tail,
    .rd_en, .rd_vc, .rd_esc,
    .xb_valid, .xb_sel, .xb_to_esc, .xb_vc,
    .grant_adp, .new_grant);

  flit_t [NP-1:0] rd_flit;
  always_comb begin
    for (int p = 0; p < NP; p++)
      rd_flit[p] = rd_esc[p] ? esc_head[p][rd_vc[p]] : adp_head[p][rd_vc[p]];
    for (int o = 0; o < NP; o++) begin
      out_link[o].valid = xb_valid[o];
      out_link[o].esc   = xb_to_esc[o];
      out_link[o].vc    = xb_vc[o];
      out_link[o].flit  = rd_flit[xb_sel[o]];
    end
  end

  // ---------------- event strobes ----------------
  always_comb begin
    ev = '0;
    for (int o = 0; o < 4; o++)
      for (int v = 0; v < NV; v++) begin
        if (swap_done[o][v]) ev.swap = 1'b1;
        if (cb[o][v] != '0 && !swap_done[o][v] && esc_rel[o][v]) ev.hold = 1'b1;
      end
    for (int p = 0; p < NP; p++) begin
      if (new_grant[p]) begin
        if (!req_from_esc[p][rd_vc[p]] && req_to_esc[p][rd_vc[p]]) ev.escape = 1'b1;
        if (req_from_esc[p][rd_vc[p]] && !req_to_esc[p][rd_vc[p]] &&
            req_out[p][rd_vc[p]] != P_LOC) ev.esc_back = 1'b1;
        if (req_from_esc[p][rd_vc[p]] && req_to_esc[p][rd_vc[p]] &&
            req_out[p][rd_vc[p]] == port_e'(p)) ev.ring_fwd = 1'b1;
        if (req_to_esc[p][rd_vc[p]] && req_out[p][rd_vc[p]] != P_LOC &&
            !(req_from_esc[p][rd_vc[p]] && req_out[p][rd_vc[p]] == port_e'(p)))
          ev.ring_enter = 1'b1;
      end
    end
  end
endmodule
