// tb_escape_buffer: random write/read traffic against a reference queue.
// Checks the read data, count, the valid flag and the idle flag (empty and no
// packet half received) every cycle; packets of random length are written
// flit by flit so the half-received state is exercised.
module tb_escape_buffer;
  import ffc_pkg::*;
  localparam int unsigned DEPTH = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  wr_en, rd_en, rd_valid, idle;
  flit_t wr_flit, rd_flit;
  logic [$clog2(DEPTH+1)-1:0] count;

  escape_buffer #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  flit_t q[$];
  int left = 0;       // flits still to write of the current packet
  bit  mid = 0;       // a packet is half written

  initial begin
    wr_en = 0; rd_en = 0; wr_flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      // check outputs against the model
      checks++;
      if (count != q.size() || rd_valid != (q.size() != 0) ||
          idle != (q.size() == 0 && !mid) || (q.size() != 0 && rd_flit != q[0])) begin
        failures++;
        $display("FAIL cycle %0d count=%0d/%0d idle=%0d mid=%0d", c, count, q.size(), idle, mid);
      end
      rd_en = (q.size() != 0) && ($urandom_range(3) != 0);
      wr_en = (q.size() < DEPTH || rd_en) && ($urandom_range(2) != 0);
      if (wr_en) begin
        if (left == 0) left = $urandom_range(MAX_PKT, 1);
        wr_flit = '0;
        wr_flit.data = $urandom;
        wr_flit.head = !mid;
        wr_flit.tail = (left == 1);
      end
      @(posedge clk);
      #1;
      if (rd_en) void'(q.pop_front());
      if (wr_en) begin
        q.push_back(wr_flit);
        left--;
        mid = (left != 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
