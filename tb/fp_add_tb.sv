// fp_add_tb: self-checking test of the five-stage floating-point adder.
//
// Two adders are tested side by side: the default 16-bit format (1/6/9) and
// the 32-bit format (1/8/23). Random operand pairs, including equal and
// opposite values, wide exponent gaps, zeros, overflow and infinity, are
// issued one per clock; each result is compared with fp_ref_pkg's exact
// truncated sum, and every result must arrive exactly five clocks after its
// operands. A directed FPU32 case adds two significands with equal
// exponents and checks the carry-out normalisation and the truncated bit.
module fp_add_tb;
  import fp_ref_pkg::*;

  typedef fp_ref #(6, 9)  r16;
  typedef fp_ref #(8, 23) r32;

  localparam int LAT = 5;
  localparam int N   = 20000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic        v_in;
  logic [15:0] a16, b16, y16;
  logic [31:0] a32, b32, y32;
  logic        v16, v32;

  fp_add dut16 (.clk(clk), .rst(rst), .in_valid(v_in), .a(a16), .b(b16),
                .out_valid(v16), .y(y16));
  fp_add #(.EXP_W(8), .FRAC_W(23)) dut32 (.clk(clk), .rst(rst), .in_valid(v_in),
                .a(a32), .b(b32), .out_valid(v32), .y(y32));

  int checks = 0, failures = 0;
  longint cyc = 0;
  logic [15:0] exp16 [$];
  logic [31:0] exp32 [$];
  longint      t_in  [$];

  always_ff @(posedge clk) cyc <= cyc + 1;

  // stamp each operation with the edge that samples it
  always @(posedge clk) if (!rst && v_in) t_in.push_back(cyc);

  // compare outputs as they appear
  always @(posedge clk) begin
    if (!rst && v16) begin
      logic [15:0] e16;
      logic [31:0] e32;
      longint t;
      e16 = exp16.pop_front();
      e32 = exp32.pop_front();
      t   = t_in.pop_front();
      checks += 3;
      if (y16 !== e16) begin
        failures++;
        if (failures < 10) $display("FAIL16 got %h exp %h", y16, e16);
      end
      if (!v32 || y32 !== e32) begin
        failures++;
        if (failures < 10) $display("FAIL32 got %h exp %h", y32, e32);
      end
      if (cyc - t != LAT) begin
        failures++;
        if (failures < 10) $display("FAIL latency %0d", cyc - t);
      end
    end
  end

  task automatic issue(logic [15:0] x16, logic [15:0] z16, logic [31:0] x32, logic [31:0] z32);
    a16 <= x16; b16 <= z16; a32 <= x32; b32 <= z32; v_in <= 1'b1;
    exp16.push_back(r16::add(x16, z16));
    exp32.push_back(r32::add(x32, z32));
    @(posedge clk);
  endtask

  function automatic logic [15:0] pick16();
    int k = int'($urandom_range(9));
    case (k)
      0:       return 16'h0000;
      1:       return 16'hFFFF;                 // infinity pattern
      2:       return r16::rand_val(25, 30);     // near the top of the range
      3:       return r16::rand_val(-30, -25);   // near the bottom
      default: return r16::rand_val(-6, 6);
    endcase
  endfunction

  function automatic logic [31:0] pick32();
    int k = int'($urandom_range(9));
    case (k)
      0:       return 32'h0000_0000;
      1:       return 32'h7F80_0000;
      2:       return r32::rand_val(120, 127);
      3:       return r32::rand_val(-126, -120);
      default: return r32::rand_val(-30, 30);
    endcase
  endfunction

  initial begin
    v_in = 1'b0; a16 = '0; b16 = '0; a32 = '0; b32 = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // directed: 1.1111100000111001000010 1 + 1.0000001000111001000100 0, both 2^15
    issue(16'h3C00, 16'h3C00,
          {1'b0, 8'd142, 23'b11111000001110010000101},
          {1'b0, 8'd142, 23'b00000010001110010001000});
    for (int n = 0; n < N; n++) begin
      logic [15:0] x16, z16;
      logic [31:0] x32, z32;
      x16 = pick16(); z16 = pick16();
      x32 = pick32(); z32 = pick32();
      case ($urandom_range(7))
        0: begin z16 = {~x16[15], x16[14:0]}; z32 = {~x32[31], x32[30:0]}; end // cancel
        1: begin z16 = x16; z32 = x32; end
        2: begin z16[14:9] = x16[14:9]; z16[15] = ~x16[15];
                 z32[30:23] = x32[30:23]; z32[31] = ~x32[31]; end            // close path
        default: ;
      endcase
      issue(x16, z16, x32, z32);
    end
    v_in <= 1'b0;
    repeat (LAT + 3) @(posedge clk);
    // directed result of the first operation, FPU32: 1.01111101001110010000110 x 2^16
    checks++;
    if (r32::add({1'b0, 8'd142, 23'b11111000001110010000101},
                 {1'b0, 8'd142, 23'b00000010001110010001000})
        !== {1'b0, 8'd143, 23'b01111101001110010000110}) failures++;
    if (exp16.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
