// tb_damq_buffer: random writes and reads on all queues of the shared
// adaptive buffer against one reference queue per VC. Checks every queue
// head, its valid flag and the total occupancy each cycle, and that one queue
// can take the whole buffer while the others are empty.
module tb_damq_buffer;
  import ffc_pkg::*;
  localparam int unsigned DEPTH = 48;
  localparam int unsigned NQ    = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic wr_en, rd_en;
  logic [1:0] wr_q, rd_q;
  flit_t wr_flit;
  flit_t [NQ-1:0] head_flit;
  logic  [NQ-1:0] head_valid;
  logic [$clog2(DEPTH+1)-1:0] used;

  damq_buffer #(.DEPTH(DEPTH), .NQ(NQ)) dut (.*);

  int checks = 0, failures = 0;
  flit_t q [NQ][$];
  int total = 0;

  task automatic check(int c);
    checks++;
    if (used != total) begin
      failures++; $display("FAIL %0d used=%0d expected %0d", c, used, total);
    end
    for (int i = 0; i < NQ; i++) begin
      if (head_valid[i] != (q[i].size() != 0) ||
          (q[i].size() != 0 && head_flit[i] != q[i][0])) begin
        failures++; $display("FAIL %0d queue %0d head", c, i);
      end
    end
  endtask

  task automatic step(bit w, int wq, bit r, int rq);
    @(negedge clk);
    wr_en = w; wr_q = 2'(wq); rd_en = r; rd_q = 2'(rq);
    wr_flit = '0; wr_flit.data = $urandom; wr_flit.len = 4'($urandom_range(12, 1));
    @(posedge clk); #1;
    if (r) begin void'(q[rq].pop_front()); total--; end
    if (w) begin q[wq].push_back(wr_flit); total++; end
    wr_en = 0; rd_en = 0;
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_q = 0; rd_q = 0; wr_flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // one queue fills the whole buffer, then drains
    for (int i = 0; i < DEPTH; i++) begin step(1, 2, 0, 0); check(i); end
    for (int i = 0; i < DEPTH; i++) begin step(0, 0, 1, 2); check(i); end
    // random mixed traffic
    for (int c = 0; c < 6000; c++) begin
      bit w, r; int wq, rq;
      rq = $urandom_range(NQ - 1);
      r  = (q[rq].size() != 0) && ($urandom_range(2) != 0);
      wq = $urandom_range(NQ - 1);
      w  = (total < DEPTH) && ($urandom_range(c % 1000 < 500 ? 3 : 1) != 0);
      step(w, wq, r, rq);
      check(c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
