// tb_route_compute: exhaustive check over all source/destination pairs of a
// K x K torus (K = 4 and, in a second instance, K = 8). The reference takes
// the signed ring offset in each dimension: the escape port must be the
// dimension-order (X first) minimal direction, the productive set all minimal
// directions, and the adaptive port the productive port with the most free
// credits (random credit values, lowest port on a tie).
module tb_route_compute;
  import ffc_pkg::*;

  int checks = 0, failures = 0;

  logic [COORD_W-1:0]     my_x, my_y, dst_x, dst_y;
  logic [3:0][ACNT_W-1:0] adp_free;
  port_e                  esc4, adp4, esc8, adp8;
  logic [ACNT_W-1:0]      cred4, cred8;
  logic [3:0]             prod4, prod8;

  route_compute #(.K(4)) dut4 (.my_x, .my_y, .dst_x, .dst_y, .adp_free,
    .esc_port(esc4), .adp_port(adp4), .adp_cred(cred4), .productive(prod4));
  route_compute #(.K(8)) dut8 (.my_x, .my_y, .dst_x, .dst_y, .adp_free,
    .esc_port(esc8), .adp_port(adp8), .adp_cred(cred8), .productive(prod8));

  task automatic expect_for(int k, port_e esc, port_e adp, logic [ACNT_W-1:0] cred,
                            logic [3:0] prod);
    int fx, fy;
    logic [3:0] ep;
    port_e ee, ea;
    int best;
    fx = (int'(dst_x) - int'(my_x) + k) % k;
    fy = (int'(dst_y) - int'(my_y) + k) % k;
    ep = '0;
    if (fx != 0 && 2 * fx <= k) ep[0] = 1;
    if (fx != 0 && 2 * fx >= k) ep[1] = 1;
    if (fy != 0 && 2 * fy <= k) ep[2] = 1;
    if (fy != 0 && 2 * fy >= k) ep[3] = 1;
    ee = P_LOC;
    for (int p = 3; p >= 0; p--) if (ep[p]) ee = port_e'(p);
    ea = P_LOC; best = -1;
    for (int p = 0; p < 4; p++)
      if (ep[p] && int'(adp_free[p]) > best) begin best = int'(adp_free[p]); ea = port_e'(p); end
    checks++;
    if (prod != ep || esc != ee || adp != ea || (ea != P_LOC && cred != adp_free[ea[1:0]])) begin
      failures++;
      $display("FAIL K=%0d (%0d,%0d)->(%0d,%0d): esc %0d/%0d adp %0d/%0d prod %b/%b",
               k, my_x, my_y, dst_x, dst_y, esc, ee, adp, ea, prod, ep);
    end
  endtask

  initial begin
    for (int mx = 0; mx < 8; mx++)
      for (int my = 0; my < 8; my++)
        for (int dx = 0; dx < 8; dx++)
          for (int dy = 0; dy < 8; dy++) begin
            my_x = 3'(mx); my_y = 3'(my); dst_x = 3'(dx); dst_y = 3'(dy);
            for (int p = 0; p < 4; p++) adp_free[p] = ACNT_W'($urandom_range(ADP_DEPTH));
            #1;
            if (mx < 4 && my < 4 && dx < 4 && dy < 4) expect_for(4, esc4, adp4, cred4, prod4);
            expect_for(8, esc8, adp8, cred8, prod8);
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
