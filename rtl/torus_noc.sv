// torus_noc: K x K two-dimensional torus of FFC-CR routers.
//
// Router (x, y) is node n = y*K + x. Its X+ output feeds the X+ input of
// (x+1 mod K, y), and credits and bubble bits of that input come back on the
// same pair of ports; likewise for X-, Y+ and Y-. Each of the four
// unidirectional rings of every row and column starts with one bubble per VC:
// the router whose downstream neighbour has coordinate 0 (X+, Y+) or K-1
// (X-, Y-) begins with Cb = 1 on that output.
//
// Node interface, per node: inj_link/inj_cred is the injection port (the node
// sends flits into the router's local input buffers and receives their
// credits back), ej_link carries delivered flits, always accepted. ev gives
// each router's event strobes.
//
// ESCAPE_ONLY = 1 builds the single-VC FFC network (DOR in the escape
// buffers, bubble flow control only) instead of FFC-CR.
//
// The 4 x 4 torus with one node per router is one of the configurations the
// description evaluates (16 nodes); K = 8 gives its 64-node case.
module torus_noc
  import ffc_pkg::*;
#(
  parameter int unsigned K        = 4,
  parameter int unsigned TH_BLOCK = 16,
  parameter int unsigned TH_BACK  = MAX_PKT,
  parameter bit          ESCAPE_ONLY = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  link_t [K*K-1:0]   inj_link,
  output cred_t [K*K-1:0]   inj_cred,
  output link_t [K*K-1:0]   ej_link,
  output ev_t   [K*K-1:0]   ev
);
  localparam int unsigned N = K * K;

  link_t [N-1:0][NUM_PORTS-1:0] r_in, r_out;
  cred_t [N-1:0][NUM_PORTS-1:0] r_cin, r_cout;

  function automatic int unsigned node(input int unsigned x, input int unsigned y);
    return (y % K) * K + (x % K);
  endfunction

  for (genvar y = 0; y < K; y++) begin : g_y
    for (genvar x = 0; x < K; x++) begin : g_x
      localparam int unsigned NI  = y * K + x;
      localparam int unsigned NXP = node(x + 1, y);
      localparam int unsigned NXM = node(x + K - 1, y);
      localparam int unsigned NYP = node(x, y + 1);
      localparam int unsigned NYM = node(x, y + K - 1);
      localparam logic [3:0] BI = {y == 0, y == K - 1, x == 0, x == K - 1};

      // links arriving here come from the neighbour on the opposite side
      assign r_in[NI][P_XP]  = r_out[NXM][P_XP];
      assign r_in[NI][P_XM]  = r_out[NXP][P_XM];
      assign r_in[NI][P_YP]  = r_out[NYM][P_YP];
      assign r_in[NI][P_YM]  = r_out[NYP][P_YM];
      assign r_in[NI][P_LOC] = inj_link[NI];
      // credits for our outputs come from the router we send to
      assign r_cin[NI][P_XP]  = r_cout[NXP][P_XP];
      assign r_cin[NI][P_XM]  = r_cout[NXM][P_XM];
      assign r_cin[NI][P_YP]  = r_cout[NYP][P_YP];
      assign r_cin[NI][P_YM]  = r_cout[NYM][P_YM];
      assign r_cin[NI][P_LOC] = '0;
      assign inj_cred[NI]     = r_cout[NI][P_LOC];
      assign ej_link[NI]      = r_out[NI][P_LOC];

      router #(.K(K), .X(x), .Y(y), .BUBBLE_INIT(BI),
               .TH_BLOCK(TH_BLOCK), .TH_BACK(TH_BACK), .ESCAPE_ONLY(ESCAPE_ONLY)) u_router (
        .clk, .rst_n,
        .in_link(r_in[NI]), .out_link(r_out[NI]),
        .in_cred(r_cin[NI]), .out_cred(r_cout[NI]),
        .ev(ev[NI]));
    end
  end
endmodule
