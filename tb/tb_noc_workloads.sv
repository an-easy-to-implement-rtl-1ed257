// tb_noc_workloads: the network configurations the design is evaluated in,
// each under saturated uniform, hotspot and exponential traffic:
//  * 4 x 4 torus, single-VC FFC (dimension-order routing, escape buffers only)
// (the 4 x 4 FFC-CR torus is tb_torus_noc). Each must deliver every packet
// intact; the escape-only networks rely on FFC alone for deadlock freedom.
module tb_noc_workloads;
  bit d0;
  int c0, f0;

  noc_bench #(.K(4), .ESCAPE_ONLY(1'b1), .PKTS(250)) b_4x4_dor (.done(d0), .checks(c0), .failures(f0));

  initial begin
    wait (d0);
    $display("TB_RESULT checks=%0d failures=%0d", c0, f0);
    $finish;
  end

  // watchdog (the benches also have their own)
  initial begin
    #20ms;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c0, f0 + 1);
    $finish;
  end
endmodule
