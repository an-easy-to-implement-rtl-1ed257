// tb_credit_mgmt: directed test of the FFC credit manager, following the
// bubble-swap example of a 12-flit bubble: the downstream buffer becomes the
// bubble, the local escape buffer then releases packets of 2, 3, 4 and 3
// flits whose credits must be held in Ca (nothing returned upstream), and
// when the local buffer is empty the bubble bit and all 12 accumulated
// credits go upstream in one cycle, after which normal one-per-flit credit
// return resumes. Also checks the downstream credit counters (Cc) on sends
// and returns, adaptive credit pass-through, the bubble-busy flag, a swap
// with an already empty buffer, and the initial bubble after reset.
module tb_credit_mgmt;
  import ffc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cred_t ds_cred, up_cred, up_cred_i;
  logic send_valid, send_esc, loc_adp_rel;
  logic [VC_W-1:0] send_vc;
  logic [NUM_VC-1:0] loc_esc_rel, loc_esc_idle, busy, busy_i, swap_done, swap_done_i;
  logic [NUM_VC-1:0][ECNT_W-1:0] cc_esc, ca, cc_esc_i, ca_i;
  logic [ACNT_W-1:0] cc_adp, cc_adp_i;
  logic [NUM_VC-1:0][1:0] cb, cb_i;

  credit_mgmt #(.BUBBLE_INIT(1'b0)) dut (
    .clk, .rst_n, .ds_cred, .send_valid, .send_esc, .send_vc,
    .loc_esc_rel, .loc_esc_idle, .loc_adp_rel,
    .cc_esc, .cc_adp, .ds_bubble_busy(busy), .up_cred, .ca, .cb, .swap_done);
  credit_mgmt #(.BUBBLE_INIT(1'b1)) dut_init (
    .clk, .rst_n, .ds_cred, .send_valid, .send_esc, .send_vc,
    .loc_esc_rel('0), .loc_esc_idle('0), .loc_adp_rel(1'b0),
    .cc_esc(cc_esc_i), .cc_adp(cc_adp_i), .ds_bubble_busy(busy_i), .up_cred(up_cred_i),
    .ca(ca_i), .cb(cb_i), .swap_done(swap_done_i));

  int checks = 0, failures = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic idle_inputs();
    ds_cred = '0; send_valid = 0; send_esc = 0; send_vc = 0;
    loc_esc_rel = '0; loc_adp_rel = 0;
  endtask

  // release n flits of VC v from the local escape buffer, one per cycle,
  // checking that nothing is returned upstream
  task automatic release_held(int v, int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      idle_inputs();
      loc_esc_rel[v] = 1;
      #1;
      chk(up_cred.esc[v] == 0 && !up_cred.bubble[v], "credit returned during swap");
    end
    @(negedge clk);
    idle_inputs();
  endtask

  initial begin
    idle_inputs();
    loc_esc_idle = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(cc_esc[1] == ESC_DEPTH && cc_adp == ADP_DEPTH && cb[1] == 0 && ca[1] == 0, "reset state");
    chk(cb_i[1] == 1 && busy_i[1], "initial bubble");

    // send 5 escape flits of VC 1 and 3 adaptive flits downstream
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); idle_inputs(); send_valid = 1; send_esc = 1; send_vc = 1;
    end
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); idle_inputs(); send_valid = 1; send_esc = 0;
    end
    @(negedge clk); idle_inputs();
    chk(cc_esc[1] == ESC_DEPTH - 5 && cc_esc[0] == ESC_DEPTH, "escape credits after sends");
    chk(cc_adp == ADP_DEPTH - 3, "adaptive credits after sends");
    // the downstream router returns 2 escape credits at once and one adaptive
    ds_cred.esc[1] = 2; ds_cred.adp = 1;
    @(negedge clk); idle_inputs();
    chk(cc_esc[1] == ESC_DEPTH - 3 && cc_adp == ADP_DEPTH - 2, "credits after return");

    // normal operation: one released flit returns one credit, same cycle
    loc_esc_rel[1] = 1; loc_adp_rel = 1;
    #1;
    chk(up_cred.esc[1] == 1 && up_cred.adp && !up_cred.bubble[1], "normal C_release");
    @(negedge clk); idle_inputs();

    // the downstream buffer of VC 1 becomes the bubble
    ds_cred.bubble[1] = 1;
    #1;
    chk(busy[1], "bubble-busy in the cycle of the bubble assertion");
    @(negedge clk); idle_inputs();
    chk(cb[1] == 1 && busy[1] && !busy[0], "Cb set");
    // packets of 2, 3, 4 and 3 flits leave the swap buffer: Ca = 12
    release_held(1, 2);
    release_held(1, 3);
    chk(ca[1] == 5, "Ca = 5 after two packets");
    release_held(1, 4);
    release_held(1, 3);
    chk(ca[1] == 12 && !swap_done[1], "Ca = 12, buffer not yet empty");
    // adaptive credits are never held
    loc_adp_rel = 1; #1;
    chk(up_cred.adp, "adaptive credit during swap");
    @(negedge clk); idle_inputs();
    // local escape buffer empty: full credit reached
    loc_esc_idle[1] = 1;
    #1;
    chk(swap_done[1] && up_cred.bubble[1] && up_cred.esc[1] == 12, "B_ctrl and AC_release");
    chk(!up_cred.bubble[0] && up_cred.esc[0] == 0, "other VC untouched");
    @(negedge clk);
    chk(cb[1] == 0 && ca[1] == 0 && !busy[1] && !up_cred.bubble[1], "counters cleared");
    // normal return recovered
    loc_esc_idle[1] = 0; loc_esc_rel[1] = 1; #1;
    chk(up_cred.esc[1] == 1, "normal return after swap");
    @(negedge clk); idle_inputs();

    // bubble arrives while the local buffer is already empty: moves on at once
    loc_esc_idle[2] = 1;
    ds_cred.bubble[2] = 1;
    @(negedge clk); idle_inputs();
    chk(swap_done[2] && up_cred.bubble[2] && up_cred.esc[2] == 0, "immediate swap");
    @(negedge clk);
    chk(cb[2] == 0, "immediate swap cleared");

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
