// request_gen: request generation with credit reservation (FFC-CR) for one
// input port.
//
// Each VC of the port has two queues: its share of the adaptive buffer and
// its fixed escape buffer. For every VC this module works out one request
// from the two queue heads (compare-merge), so the switch allocator sees one
// request per VC instead of two:
//  1. a blocked adaptive packet (highest priority) asks for its escape (DOR)
//     port and the downstream escape buffer;
//  2. otherwise the escape packet; it goes back to the adaptive network when
//     the free adaptive credits of its best adaptive port exceed TH_BACK,
//     else it stays on its escape (DOR) port;
//  3. otherwise an unblocked adaptive packet asks for its adaptive port.
// A candidate whose downstream space is missing is skipped (virtual cut-
// through: the whole packet must fit). Entering an escape buffer from outside
// its ring (from an adaptive buffer, another input direction or injection) is
// also refused while that downstream buffer is the ring's bubble.
//
// A timer per adaptive VC counts the cycles its head packet finds no adaptive
// credit; at TH_BLOCK the packet is blocked and escapes. The timer clears as
// soon as adaptive credit is available again (adaptive routing resumes) or
// when the packet is granted.
//
// Timing: requests are combinational from the queue heads and credit state;
// timers update at the clock edge.
//
// ESCAPE_ONLY = 1 gives the single-VC FFC configuration (FFC-1xVC): every
// packet, injected ones included, is routed by DOR in the escape network and
// the adaptive network is not used.
//
// The priority order, the timer and the switch-back threshold (initially one
// longest packet) follow the description. TH_BLOCK's value is this design's
// choice; the description only says "a predetermined threshold".
module request_gen
  import ffc_pkg::*;
#(
  parameter int unsigned PORT_ID  = 0,
  parameter int unsigned K        = 4,
  parameter int unsigned TH_BLOCK = 16,
  parameter int unsigned TH_BACK  = MAX_PKT,
  parameter bit          ESCAPE_ONLY = 1'b0
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [COORD_W-1:0]                  my_x,
  input  logic [COORD_W-1:0]                  my_y,
  input  flit_t [NUM_VC-1:0]                  adp_head,
  input  logic  [NUM_VC-1:0]                  adp_valid,
  input  flit_t [NUM_VC-1:0]                  esc_head,
  input  logic  [NUM_VC-1:0]                  esc_valid,
  input  logic  [3:0][ACNT_W-1:0]             cc_adp,
  input  logic  [3:0][NUM_VC-1:0][ECNT_W-1:0] cc_esc,
  input  logic  [3:0][NUM_VC-1:0]             bubble_busy,
  input  logic  [NUM_VC-1:0]                  adp_granted,
  output logic  [NUM_VC-1:0]                  req_valid,
  output port_e [NUM_VC-1:0]                  req_out,
  output logic  [NUM_VC-1:0]                  req_to_esc,
  output logic  [NUM_VC-1:0]                  req_from_esc,
  output logic  [NUM_VC-1:0][LEN_W-1:0]       req_len,
  output logic  [NUM_VC-1:0]                  blocked,
  output logic  [NUM_VC-1:0]                  esc_to_adp
);
  localparam int unsigned TW = $clog2(TH_BLOCK + 1);

  logic [TW-1:0] timer [NUM_VC];
  logic [NUM_VC-1:0] adp_avail;

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    port_e               a_esc_port, a_adp_port, e_esc_port, e_adp_port;
    logic [ACNT_W-1:0]   a_cred, e_cred;
    logic [3:0]          a_prod, e_prod;

    route_compute #(.K(K)) u_rc_adp (
      .my_x, .my_y, .dst_x(adp_head[v].dx), .dst_y(adp_head[v].dy),
      .adp_free(cc_adp), .esc_port(a_esc_port), .adp_port(a_adp_port),
      .adp_cred(a_cred), .productive(a_prod));

    route_compute #(.K(K)) u_rc_esc (
      .my_x, .my_y, .dst_x(esc_head[v].dx), .dst_y(esc_head[v].dy),
      .adp_free(cc_adp), .esc_port(e_esc_port), .adp_port(e_adp_port),
      .adp_cred(e_cred), .productive(e_prod));

    // may a packet of length len enter the escape buffer behind port o?
    function automatic logic esc_ok(input port_e o, input logic [LEN_W-1:0] len,
                                    input logic in_ring);
      if (o == P_LOC) return 1'b1;
      return (cc_esc[o[1:0]][v] >= ECNT_W'(len)) && (in_ring || !bubble_busy[o[1:0]][v]);
    endfunction

    logic a_local, e_local;
    logic blk_ok, esc_req_ok, esc_back, adp_ok;
    logic [LEN_W-1:0] a_len, e_len;

    always_comb begin
      a_len   = adp_head[v].len;
      e_len   = esc_head[v].len;
      a_local = (a_adp_port == P_LOC);
      e_local = (e_adp_port == P_LOC);

      adp_avail[v] = a_local || (a_cred >= ACNT_W'(a_len));
      blocked[v]   = adp_valid[v] &&
                     (ESCAPE_ONLY || ((timer[v] >= TW'(TH_BLOCK)) && !adp_avail[v]));

      blk_ok   = blocked[v] && esc_ok(a_esc_port, a_len, 1'b0);
      esc_back = !ESCAPE_ONLY && !e_local && (e_cred > ACNT_W'(TH_BACK)) && (e_cred >= ACNT_W'(e_len));
      esc_req_ok = esc_valid[v] &&
                   (esc_back || esc_ok(e_esc_port, e_len,
                                       (PORT_ID < 4) && (e_esc_port == port_e'(PORT_ID))));
      adp_ok   = adp_valid[v] && !blocked[v] && adp_avail[v];

      req_valid[v]    = 1'b0;
      req_out[v]      = P_LOC;
      req_to_esc[v]   = 1'b0;
      req_from_esc[v] = 1'b0;
      req_len[v]      = a_len;
      esc_to_adp[v]   = 1'b0;
      if (blk_ok) begin
        req_valid[v]  = 1'b1;
        req_out[v]    = a_esc_port;
        req_to_esc[v] = 1'b1;
      end else if (esc_req_ok) begin
        req_valid[v]    = 1'b1;
        req_from_esc[v] = 1'b1;
        req_len[v]      = e_len;
        if (esc_back) begin
          req_out[v]    = e_adp_port;
          esc_to_adp[v] = 1'b1;
        end else begin
          req_out[v]    = e_esc_port;
          req_to_esc[v] = 1'b1;
        end
      end else if (adp_ok) begin
        req_valid[v] = 1'b1;
        req_out[v]   = a_adp_port;
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)
        timer[v] <= '0;
      else if (!adp_valid[v] || adp_avail[v] || adp_granted[v])
        timer[v] <= '0;
      else if (timer[v] < TW'(TH_BLOCK))
        timer[v] <= timer[v] + 1'b1;
    end
  end
endmodule
