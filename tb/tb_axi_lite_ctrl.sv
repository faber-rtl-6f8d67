// tb_axi_lite_ctrl: self-checking test of the AXI4-Lite register file.
// Writes every address, matrix and mode register and reads them back, checks
// byte strobes, checks that START gives one start pulse only while the core is
// idle and carries the FILL bit, that DONE is sticky until the next START, and
// that the 64-bit result reads back in two halves, and that WARP_OUT and the
// output address reach the core. Responses are held with
// back-pressure on bready/rready for a few cycles.
module tb_axi_lite_ctrl;
  import faber_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] awaddr, araddr; logic awvalid, awready, wvalid, wready, bvalid, bready;
  logic [31:0] wdata, rdata; logic [3:0] wstrb; logic [1:0] bresp, rresp;
  logic arvalid, arready, rvalid, rready;
  logic start, fill_req, warp_out, core_idle, core_done;
  metric_t result;
  logic [63:0] ref_addr, flt_addr, res_addr, out_addr;
  affine_t matrix;
  interp_e interp;
  int checks = 0, failures = 0, starts = 0;

  axi_lite_ctrl dut (.*);

  always @(posedge clk) if (start) starts++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d, input logic [3:0] s = 4'hf);
    awaddr = a; wdata = d; wstrb = s; awvalid = 1; wvalid = 1;
    do @(posedge clk); while (!(awready && wready));
    #1 awvalid = 0; wvalid = 0;
    repeat ($urandom % 3) @(posedge clk);
    #1 bready = 1;
    do @(posedge clk); while (!bvalid);
    #1 bready = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    #1 arvalid = 0;
    repeat ($urandom % 3) @(posedge clk);
    #1 rready = 1;
    do @(posedge clk); while (!rvalid);
    d = rdata;
    #1 rready = 0;
  endtask

  logic [31:0] v, exp [logic [7:0]];
  initial begin
    awaddr = 0; araddr = 0; awvalid = 0; wvalid = 0; wdata = 0; wstrb = 0; bready = 0;
    arvalid = 0; rready = 0; core_idle = 1; core_done = 0; result = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // address and matrix registers
    for (int a = 8'h10; a <= 8'h3c; a += 4) begin
      exp[a] = $urandom;
      wr(a, exp[a]);
    end
    exp[8'h48] = $urandom; wr(8'h48, exp[8'h48]);
    exp[8'h4c] = $urandom; wr(8'h4c, exp[8'h4c]);
    // byte strobe: change only byte 1 of m00
    wr(8'h28, 32'hA5A5A5A5, 4'b0010);
    exp[8'h28][15:8] = 8'hA5;
    for (int a = 8'h10; a <= 8'h3c; a += 4) begin
      rd(a, v);
      check($sformatf("register %h", a), v, exp[a]);
    end
    check("ref_addr", ref_addr, {exp[8'h14], exp[8'h10]});
    check("flt_addr", flt_addr, {exp[8'h1c], exp[8'h18]});
    check("res_addr", res_addr, {exp[8'h24], exp[8'h20]});
    check("out_addr", out_addr, {exp[8'h4c], exp[8'h48]});
    rd(8'h48, v); check("out_addr low", v, exp[8'h48]);
    rd(8'h4c, v); check("out_addr high", v, exp[8'h4c]);
    check("m00 port", matrix.m00, exp[8'h28]);
    check("m12 port", matrix.m12, exp[8'h3c]);
    wr(8'h08, 1);
    check("interp", interp, INTERP_BILINEAR);
    // START with FILL while idle
    wr(8'h00, 32'h9);
    check("one start pulse", starts, 1);
    check("fill_req", fill_req, 1);
    core_idle = 0;
    rd(8'h00, v);
    check("status busy", v[3:0], 4'b1001);
    // START while busy is ignored
    wr(8'h00, 32'h1);
    check("start ignored while busy", starts, 1);
    result = 64'hFEDC_BA98_7654_3210;
    @(posedge clk); #1 core_done = 1; core_idle = 1;
    @(posedge clk); #1 core_done = 0;
    repeat (3) @(posedge clk); #1;
    rd(8'h00, v);
    check("status done sticky", v[3:0], 4'b1110);
    rd(8'h40, v); check("result low", v, 32'h7654_3210);
    rd(8'h44, v); check("result high", v, 32'hFEDC_BA98);
    // a new START without FILL clears DONE
    wr(8'h00, 32'h1);
    check("second start", starts, 2);
    check("fill_req cleared", fill_req, 0);
    check("warp_out clear", warp_out, 0);
    core_idle = 1;
    wr(8'h00, 32'h11);
    check("warp-out start", starts, 3);
    check("warp_out set", warp_out, 1);
    rd(8'h00, v);
    check("status warp_out", v[4], 1);
    rd(8'h00, v);
    check("done cleared", v[1], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
