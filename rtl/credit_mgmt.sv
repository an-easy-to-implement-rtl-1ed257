// credit_mgmt: credit management for one network output port, with the
// full-credit flow control (FFC) counters.
//
// Per output port it keeps
//  * cc_adp     - free slots of the downstream shared adaptive buffer,
//  * cc_esc[v]  - free slots of the downstream escape buffer of VC v (Cc),
//  * cb[v]      - bubble indicator (Cb): the downstream escape buffer of VC v
//                 is the ring's bubble, so this router is doing a bubble swap,
//  * ca[v]      - accumulated credits (Ca).
// The output port and the local input port of the same direction form one
// ring hop, so this module also returns the credits of that input port to the
// upstream router. While cb[v] > 0 (FFC active), every escape flit released
// from the local escape buffer of VC v is added to ca[v] instead of being
// returned. When the local escape buffer becomes empty (esc_idle: no flit
// stored, no packet half received) the full credit is reached: the module
// asserts the bubble bit for VC v towards upstream (B_ctrl), returns ca[v] in
// the same cycle (AC_release), and clears ca[v] and one count of cb[v]. The
// bubble has then moved one router backwards. Otherwise credits are returned
// one per released flit, as in plain credit-based flow control.
//
// Timing: the credit bundle to upstream is combinational from this cycle's
// releases and from registered state; the bubble bit depends on registers
// only, so the upstream router may use it in the same cycle to refuse
// out-of-ring packets (ds_bubble_busy) without forming a loop. All counters
// update at the clock edge. Credits received this cycle are usable next cycle.
//
// Follows the description: the three counters, the gating of C_release into
// Ca, and steps 1-3 of the FFC procedure. This design's choices: the
// same-cycle bubble/credit handshake and the reset state (all buffers free,
// cb = 1 where BUBBLE_INIT marks the downstream buffer as the initial bubble).
module credit_mgmt
  import ffc_pkg::*;
#(
  parameter logic BUBBLE_INIT = 1'b0,
  parameter int unsigned ESC_D = ESC_DEPTH,
  parameter int unsigned ADP_D = ADP_DEPTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // credits and bubble assertions coming back from the downstream router
  input  cred_t                      ds_cred,
  // a flit leaves on this output
  input  logic                       send_valid,
  input  logic                       send_esc,
  input  logic [VC_W-1:0]            send_vc,
  // the local input port of the same ring
  input  logic [NUM_VC-1:0]          loc_esc_rel,
  input  logic [NUM_VC-1:0]          loc_esc_idle,
  input  logic                       loc_adp_rel,
  // state for the allocator
  output logic [NUM_VC-1:0][ECNT_W-1:0] cc_esc,
  output logic [ACNT_W-1:0]          cc_adp,
  output logic [NUM_VC-1:0]          ds_bubble_busy,
  // credits to the upstream router of the local input port
  output cred_t                      up_cred,
  // observation
  output logic [NUM_VC-1:0][ECNT_W-1:0] ca,
  output logic [NUM_VC-1:0][1:0]     cb,
  output logic [NUM_VC-1:0]          swap_done
);
  always_comb begin
    up_cred     = '0;
    up_cred.adp = loc_adp_rel;
    for (int v = 0; v < NUM_VC; v++) begin
      swap_done[v]      = (cb[v] != '0) && loc_esc_idle[v];
      ds_bubble_busy[v] = (cb[v] != '0) || ds_cred.bubble[v];
      up_cred.bubble[v] = swap_done[v];
      if (swap_done[v])
        up_cred.esc[v] = ca[v];                       // AC_release
      else if (cb[v] != '0)
        up_cred.esc[v] = '0;                          // held back in Ca
      else
        up_cred.esc[v] = {{(ECNT_W-1){1'b0}}, loc_esc_rel[v]};  // C_release
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cc_adp <= ACNT_W'(ADP_D);
      for (int v = 0; v < NUM_VC; v++) begin
        cc_esc[v] <= ECNT_W'(ESC_D);
        ca[v]     <= '0;
        cb[v]     <= BUBBLE_INIT ? 2'd1 : 2'd0;
      end
    end else begin
      cc_adp <= cc_adp + ACNT_W'(ds_cred.adp)
                       - ACNT_W'(send_valid && !send_esc);
      for (int v = 0; v < NUM_VC; v++) begin
        cc_esc[v] <= cc_esc[v] + ds_cred.esc[v]
                   - ECNT_W'(send_valid && send_esc && (send_vc == VC_W'(v)));
        cb[v]     <= cb[v] - 2'(swap_done[v]) + 2'(ds_cred.bubble[v]);
        if (swap_done[v])
          ca[v] <= '0;
        else if (cb[v] != '0)
          ca[v] <= ca[v] + ECNT_W'(loc_esc_rel[v]);
      end
    end
  end

  for (genvar v = 0; v < NUM_VC; v++) begin : g_chk
    a_esc_credit: assert property (@(posedge clk) disable iff (!rst_n)
      (send_valid && send_esc && send_vc == VC_W'(v)) |-> cc_esc[v] != '0);
    a_esc_bound:  assert property (@(posedge clk) disable iff (!rst_n)
      cc_esc[v] <= ECNT_W'(ESC_D));
    a_ca_bound:   assert property (@(posedge clk) disable iff (!rst_n)
      ca[v] <= ECNT_W'(ESC_D));
  end
  a_adp_credit: assert property (@(posedge clk) disable iff (!rst_n)
    (send_valid && !send_esc) |-> cc_adp != '0);
endmodule
