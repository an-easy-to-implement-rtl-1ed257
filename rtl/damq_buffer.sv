// damq_buffer: dynamically allocated multi-queue (DAMQ) buffer holding the
// adaptive packets of all VCs of one input port.
//
// One storage array of DEPTH flit slots is shared by NQ queues. Each queue is
// a linked list (per-slot next pointer, per-queue head and tail pointers); a
// free-slot bitmap supplies the slot for a write (lowest free slot) and takes
// back the slot of a read. Any queue may use any free slot, so the space goes
// where the traffic is. One write and one read per cycle, to any queues.
//
// Timing: writes and reads take effect at the clock edge; head_flit[q] is the
// oldest flit of queue q, valid when head_valid[q]. The upstream router holds
// one shared credit counter for the whole buffer, so a write never finds it
// full (checked by an assertion); a slot freed by a read is reusable from
// the next cycle on.
//
// The description names the DAMQ organisation but gives no insides; the
// linked-list form here is this design's choice.
module damq_buffer
  import ffc_pkg::*;
#(
  parameter int unsigned DEPTH = ADP_DEPTH,
  parameter int unsigned NQ    = NUM_VC
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_en,
  input  logic [$clog2(NQ)-1:0]  wr_q,
  input  flit_t                  wr_flit,
  input  logic                   rd_en,
  input  logic [$clog2(NQ)-1:0]  rd_q,
  output flit_t [NQ-1:0]         head_flit,
  output logic  [NQ-1:0]         head_valid,
  output logic [$clog2(DEPTH+1)-1:0] used
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  flit_t          mem  [DEPTH];
  logic [AW-1:0]  nxt  [DEPTH];
  logic [DEPTH-1:0] free_map;
  logic [AW-1:0]  hd [NQ];
  logic [AW-1:0]  tl [NQ];
  logic [CW-1:0]  qcnt [NQ];

  logic [AW-1:0]  wslot;
  logic           wslot_ok;

  always_comb begin
    wslot    = '0;
    wslot_ok = 1'b0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (free_map[i]) begin
        wslot    = AW'(i);
        wslot_ok = 1'b1;
      end
    end
  end

  // Queue q is being read and will hold a slot that has a successor.
  logic [AW-1:0] rslot;
  assign rslot = hd[rd_q];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      mem[wslot] <= wr_flit;
      if (qcnt[wr_q] != '0 && !(rd_en && rd_q == wr_q && qcnt[wr_q] == CW'(1)))
        nxt[tl[wr_q]] <= wslot;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      free_map <= '1;
      used     <= '0;
      for (int q = 0; q < NQ; q++) begin
        hd[q]   <= '0;
        tl[q]   <= '0;
        qcnt[q] <= '0;
      end
    end else begin
      for (int q = 0; q < NQ; q++) begin
        logic w, r;
        w = wr_en && (wr_q == $clog2(NQ)'(q));
        r = rd_en && (rd_q == $clog2(NQ)'(q));
        qcnt[q] <= qcnt[q] + CW'(w) - CW'(r);
        if (w) tl[q] <= wslot;
        // New head: the written slot when the queue is (or becomes) empty,
        // the successor when a read leaves flits behind.
        if (w && (qcnt[q] == '0 || (r && qcnt[q] == CW'(1))))
          hd[q] <= wslot;
        else if (r)
          hd[q] <= nxt[hd[q]];
      end
      used <= used + CW'(wr_en) - CW'(rd_en);
      begin
        logic [DEPTH-1:0] fm;
        fm = free_map;
        if (rd_en) fm[rslot] = 1'b1;
        if (wr_en) fm[wslot] = 1'b0;
        free_map <= fm;
      end
    end
  end

  always_comb begin
    for (int q = 0; q < NQ; q++) begin
      head_flit[q]  = mem[hd[q]];
      head_valid[q] = (qcnt[q] != '0);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                                   wr_en |-> wslot_ok);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   rd_en |-> head_valid[rd_q]);
endmodule
