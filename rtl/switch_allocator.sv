// switch_allocator: packet-level switch allocation for the virtual
// cut-through router.
//
// Each input port offers at most one request per VC (already merged from its
// adaptive and escape queues by request_gen). Allocation is separable: every
// idle input port picks one of its requesting VCs whose output is idle
// (round robin per input), then every idle output picks one of the inputs
// that chose it (round robin per output). A grant locks the input and the
// output to that packet until its tail flit has been sent; while locked, one
// flit moves per cycle whenever the chosen queue holds one (cut-through: the
// rest of the packet may still be arriving). The head flit moves in the grant
// cycle.
//
// Outputs drive the buffer reads (rd_*) and the crossbar (xb_*): output o
// carries the flit read from input xb_sel[o]; xb_to_esc/xb_vc tell the
// downstream router which of its buffers receives it.
//
// The description names the arbitration but not its insides; the separable
// round-robin scheme and packet-level locking are this design's choices.
module switch_allocator
  import ffc_pkg::*;
#(
  parameter int unsigned NP = NUM_PORTS,
  parameter int unsigned NV = NUM_VC
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic  [NP-1:0][NV-1:0]       req_valid,
  input  port_e [NP-1:0][NV-1:0]       req_out,
  input  logic  [NP-1:0][NV-1:0]       req_to_esc,
  input  logic  [NP-1:0][NV-1:0]       req_from_esc,
  input  logic  [NP-1:0][NV-1:0]       adp_valid,
  input  logic  [NP-1:0][NV-1:0]       adp_tail,
  input  logic  [NP-1:0][NV-1:0]       esc_valid,
  input  logic  [NP-1:0][NV-1:0]       esc_tail,
  output logic  [NP-1:0]               rd_en,
  output logic  [NP-1:0][$clog2(NV)-1:0] rd_vc,
  output logic  [NP-1:0]               rd_esc,
  output logic  [NP-1:0]               xb_valid,
  output logic  [NP-1:0][$clog2(NP)-1:0] xb_sel,
  output logic  [NP-1:0]               xb_to_esc,
  output logic  [NP-1:0][$clog2(NV)-1:0] xb_vc,
  output logic  [NP-1:0][NV-1:0]       grant_adp,
  output logic  [NP-1:0]               new_grant
);
  localparam int unsigned PW = $clog2(NP);
  localparam int unsigned VW = $clog2(NV);

  // lock state
  logic [NP-1:0]          in_busy, out_busy;
  logic [NP-1:0][VW-1:0]  in_vc;
  logic [NP-1:0]          in_from_esc, in_to_esc;
  logic [NP-1:0][PW-1:0]  in_out;

  // stage 1: per input, pick a VC whose output is idle
  logic [NP-1:0]          s1_valid;
  logic [NP-1:0][VW-1:0]  s1_vc;
  logic [NP-1:0][NV-1:0]  s1_req;
  logic [NP-1:0]          s1_adv;

  // stage 2: per output, pick an input
  logic [NP-1:0][NP-1:0]  s2_req;
  logic [NP-1:0]          s2_valid;
  logic [NP-1:0][PW-1:0]  s2_idx;
  logic [NP-1:0]          in_won;

  for (genvar p = 0; p < NP; p++) begin : g_in
    always_comb begin
      for (int v = 0; v < NV; v++)
        s1_req[p][v] = !in_busy[p] && req_valid[p][v] && !out_busy[req_out[p][v]];
    end
    rr_arbiter #(.N(NV)) u_arb_in (
      .clk, .rst_n, .req(s1_req[p]), .advance(s1_adv[p]),
      .gnt_valid(s1_valid[p]), .gnt_idx(s1_vc[p]));
  end

  for (genvar o = 0; o < NP; o++) begin : g_out
    always_comb begin
      for (int p = 0; p < NP; p++)
        s2_req[o][p] = s1_valid[p] && (req_out[p][s1_vc[p]] == port_e'(o));
    end
    rr_arbiter #(.N(NP)) u_arb_out (
      .clk, .rst_n, .req(s2_req[o]), .advance(1'b1),
      .gnt_valid(s2_valid[o]), .gnt_idx(s2_idx[o]));
  end

  always_comb begin
    in_won    = '0;
    for (int o = 0; o < NP; o++)
      if (s2_valid[o]) in_won[s2_idx[o]] = 1'b1;
    s1_adv    = in_won;
    new_grant = in_won;
  end

  // effective per-input selection this cycle (locked or newly granted)
  logic [NP-1:0]          act;
  logic [NP-1:0][VW-1:0]  act_vc;
  logic [NP-1:0]          act_from_esc, act_to_esc;
  logic [NP-1:0][PW-1:0]  act_out;
  logic [NP-1:0]          act_tail;

  always_comb begin
    grant_adp = '0;
    for (int p = 0; p < NP; p++) begin
      if (in_busy[p]) begin
        act[p]          = 1'b1;
        act_vc[p]       = in_vc[p];
        act_from_esc[p] = in_from_esc[p];
        act_to_esc[p]   = in_to_esc[p];
        act_out[p]      = in_out[p];
      end else begin
        act[p]          = in_won[p];
        act_vc[p]       = s1_vc[p];
        act_from_esc[p] = req_from_esc[p][s1_vc[p]];
        act_to_esc[p]   = req_to_esc[p][s1_vc[p]];
        act_out[p]      = PW'(req_out[p][s1_vc[p]]);
        if (in_won[p] && !req_from_esc[p][s1_vc[p]]) grant_adp[p][s1_vc[p]] = 1'b1;
      end
      rd_en[p]    = act[p] && (act_from_esc[p] ? esc_valid[p][act_vc[p]]
                                               : adp_valid[p][act_vc[p]]);
      act_tail[p] = act_from_esc[p] ? esc_tail[p][act_vc[p]] : adp_tail[p][act_vc[p]];
      rd_vc[p]    = act_vc[p];
      rd_esc[p]   = act_from_esc[p];
    end
    xb_valid  = '0;
    xb_sel    = '0;
    xb_to_esc = '0;
    xb_vc     = '0;
    for (int p = 0; p < NP; p++) begin
      if (rd_en[p]) begin
        xb_valid[act_out[p]]  = 1'b1;
        xb_sel[act_out[p]]    = PW'(p);
        xb_to_esc[act_out[p]] = act_to_esc[p];
        xb_vc[act_out[p]]     = act_vc[p];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_busy     <= '0;
      out_busy    <= '0;
      in_vc       <= '0;
      in_from_esc <= '0;
      in_to_esc   <= '0;
      in_out      <= '0;
    end else begin
      for (int p = 0; p < NP; p++) begin
        if (!in_busy[p] && in_won[p]) begin
          in_vc[p]       <= act_vc[p];
          in_from_esc[p] <= act_from_esc[p];
          in_to_esc[p]   <= act_to_esc[p];
          in_out[p]      <= act_out[p];
        end
        if (act[p]) begin
          // locked from the grant until the tail has been read
          in_busy[p]           <= !(rd_en[p] && act_tail[p]);
          out_busy[act_out[p]] <= !(rd_en[p] && act_tail[p]);
        end
      end
    end
  end

  // no output is driven by two inputs in one cycle
  logic [NP-1:0] out_clash;
  always_comb begin
    logic [NP-1:0] seen;
    seen      = '0;
    out_clash = '0;
    for (int p = 0; p < NP; p++) begin
      if (rd_en[p]) begin
        if (seen[act_out[p]]) out_clash[act_out[p]] = 1'b1;
        seen[act_out[p]] = 1'b1;
      end
    end
  end
  a_no_clash: assert property (@(posedge clk) disable iff (!rst_n) out_clash == '0);
endmodule
