// route_compute: routing computation for one packet header in a K x K torus.
//
// Produces the two ports the FFC-CR router needs for every packet:
//  * esc_port - dimension-order routing (X first, then Y), taking the shorter
//    way round each ring; on a tie (distance K/2) the plus direction. This is
//    the deadlock-free escape route.
//  * adp_port - minimal fully adaptive routing: among the productive
//    directions (both directions count when the distance is exactly K/2) the
//    one whose downstream adaptive buffer has the most free credits; ties go
//    to the lower port number. adp_cred is that port's credit count.
// A packet for this router gets P_LOC on both. Purely combinational.
//
// The description says the escape port follows DOR and the adaptive port
// comes from "the adaptive routing algorithm"; the selection by most free
// adaptive credits is this design's choice.
module route_compute
  import ffc_pkg::*;
#(
  parameter int unsigned K = 4
) (
  input  logic [COORD_W-1:0]           my_x,
  input  logic [COORD_W-1:0]           my_y,
  input  logic [COORD_W-1:0]           dst_x,
  input  logic [COORD_W-1:0]           dst_y,
  input  logic [3:0][ACNT_W-1:0]       adp_free,   // free adaptive credits, ports 0..3
  output port_e                        esc_port,
  output port_e                        adp_port,
  output logic [ACNT_W-1:0]            adp_cred,
  output logic [3:0]                   productive
);
  logic [COORD_W:0] fwd_x, fwd_y;   // hops going the plus way

  always_comb begin
    fwd_x = ({1'b0, dst_x} + (COORD_W+1)'(K) - {1'b0, my_x});
    if (fwd_x >= (COORD_W+1)'(K)) fwd_x = fwd_x - (COORD_W+1)'(K);
    fwd_y = ({1'b0, dst_y} + (COORD_W+1)'(K) - {1'b0, my_y});
    if (fwd_y >= (COORD_W+1)'(K)) fwd_y = fwd_y - (COORD_W+1)'(K);

    productive = '0;
    if (fwd_x != '0) begin
      if (2 * fwd_x <= (COORD_W+2)'(K)) productive[0] = 1'b1;
      if (2 * fwd_x >= (COORD_W+2)'(K)) productive[1] = 1'b1;
    end
    if (fwd_y != '0) begin
      if (2 * fwd_y <= (COORD_W+2)'(K)) productive[2] = 1'b1;
      if (2 * fwd_y >= (COORD_W+2)'(K)) productive[3] = 1'b1;
    end

    if (productive[0])      esc_port = P_XP;
    else if (productive[1]) esc_port = P_XM;
    else if (productive[2]) esc_port = P_YP;
    else if (productive[3]) esc_port = P_YM;
    else                       esc_port = P_LOC;

    adp_port = P_LOC;
    adp_cred = '0;
    for (int p = 0; p < 4; p++) begin
      if (productive[p] && (adp_port == P_LOC || adp_free[p] > adp_cred)) begin
        adp_port = port_e'(p);
        adp_cred = adp_free[p];
      end
    end
  end
endmodule
