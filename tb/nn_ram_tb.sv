// nn_ram_tb: self-checking test of the network memory.
//
// A 1000-word, 16-bit instance and a default-size (120,300-word weight
// memory) instance are written with random data at random addresses, then
// read back; each read must return, one clock after the address, the last
// word written there, compared with a shadow copy kept by the testbench.
// A read and a write of the same address on one edge must return the old
// word. The default instance is also written at its highest address.
module nn_ram_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int D = 1000;
  logic        we, we2;
  logic [9:0]  waddr, raddr;
  logic [16:0] waddr2, raddr2;
  logic [15:0] wdata, rdata, wdata2, rdata2;

  nn_ram #(.DEPTH(D), .WIDTH(16)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                                       .raddr(raddr), .rdata(rdata));
  nn_ram big (.clk(clk), .we(we2), .waddr(waddr2), .wdata(wdata2), .raddr(raddr2), .rdata(rdata2));

  int checks = 0, failures = 0;
  logic [15:0] shadow [D];
  logic [15:0] shadow2 [int];

  initial begin
    we = 1'b0; we2 = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    waddr2 = '0; raddr2 = '0; wdata2 = '0;
    for (int k = 0; k < D; k++) begin
      @(negedge clk);
      we = 1'b1; waddr = 10'(k); wdata = 16'($urandom()); shadow[k] = wdata;
    end
    for (int n = 0; n < 4000; n++) begin
      int ra;
      @(negedge clk);
      ra = int'($urandom_range(D - 1));
      raddr = 10'(ra);
      we = $urandom_range(1) == 1;
      waddr = (n % 7 == 0) ? 10'(ra) : 10'($urandom_range(D - 1));
      wdata = 16'($urandom());
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== shadow[ra]) begin failures++; $display("FAIL %0d", ra); end
      if (we) shadow[waddr] = wdata;
    end
    we = 1'b0;
    for (int n = 0; n < 500; n++) begin
      int a;
      @(negedge clk);
      a = (n == 0) ? 120299 : int'($urandom_range(120299));
      we2 = 1'b1; waddr2 = 17'(a); wdata2 = 16'($urandom()); shadow2[a] = wdata2;
    end
    @(negedge clk);
    we2 = 1'b0;
    foreach (shadow2[a]) begin
      raddr2 = 17'(a);
      @(posedge clk);
      #1;
      checks++;
      if (rdata2 !== shadow2[a]) begin failures++; $display("FAIL big %0d", a); end
      @(negedge clk);
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
