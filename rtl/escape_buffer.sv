// escape_buffer: the fixed-size escape buffer of one VC at one input port.
//
// A plain circular FIFO, DEPTH flits deep. The description sizes it to one
// bubble, i.e. one longest packet, and reserves its credits for escape
// (deadlock-free, dimension-order) traffic. Besides the flit queue it tracks
// whether a packet is partly received (head written, tail not yet), so the
// credit manager can tell when the buffer is truly empty: `idle` is high only
// when no flit is stored and no packet is half way in. FFC ends a bubble swap
// on that condition.
//
// Timing: write and read take effect at the clock edge; rd_flit shows the
// oldest flit combinationally. Reading an empty buffer or writing a full one
// is a protocol error (checked by assertions); the credit protocol prevents it.
module escape_buffer
  import ffc_pkg::*;
#(
  parameter int unsigned DEPTH = ESC_DEPTH
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr_en,
  input  flit_t wr_flit,
  input  logic  rd_en,
  output flit_t rd_flit,
  output logic  rd_valid,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic  idle
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  flit_t           mem [DEPTH];
  logic [PW-1:0]   wp, rp;
  logic            receiving;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) mem[wp] <= wr_flit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp        <= '0;
      rp        <= '0;
      count     <= '0;
      receiving <= 1'b0;
    end else begin
      if (wr_en) wp <= inc(wp);
      if (rd_en) rp <= inc(rp);
      count <= count + CW'(wr_en) - CW'(rd_en);
      if (wr_en) receiving <= !wr_flit.tail;
    end
  end

  assign rd_flit  = mem[rp];
  assign rd_valid = (count != '0);
  assign idle     = (count == '0) && !receiving;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                                   wr_en |-> (count < ($clog2(DEPTH+1))'(DEPTH)) || rd_en);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   rd_en |-> rd_valid);
endmodule
