// tb_frame_mem - self-checking testbench for the synchronous-read RAM.
//
// A 1024 x 12 instance receives random writes and reads, many of them in the same
// cycle and some to the same address. A software copy of the contents gives the
// expected read data, which must appear exactly one cycle after the address, with
// the old contents on a read of the address being written.
module tb_frame_mem;

  localparam int DEPTH = 1024;
  localparam int WIDTH = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic             we = 1'b0;
  logic [9:0]       waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0;
  logic [WIDTH-1:0] rdata;

  frame_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_mem (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] expect_q;
  bit               expect_v = 0;
  int               n_collide = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      we = 1'b1; waddr = 10'(a); wdata = WIDTH'($urandom); model[a] = wdata;
      @(posedge clk); #1;
    end
    we = 1'b0;
    // random mixed traffic
    for (int t = 0; t < 5000; t++) begin
      raddr = 10'($urandom_range(0, DEPTH - 1));
      we    = ($urandom_range(0, 1) == 1);
      waddr = (t % 7 == 0) ? raddr : 10'($urandom_range(0, DEPTH - 1));
      wdata = WIDTH'($urandom);
      if (we && waddr == raddr) n_collide++;
      @(posedge clk);
      // expected read value is the content before this edge's write
      expect_q = model[raddr];
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        $display("FAIL read addr %0d got %0h expected %0h", raddr, rdata, expect_q);
      end
    end
    checks++;
    if (n_collide == 0) begin failures++; $display("FAIL no read-during-write case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
