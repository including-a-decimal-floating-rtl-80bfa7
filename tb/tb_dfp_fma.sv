// tb_dfp_fma - self-checking testbench of the Decimal64 fused multiply-add.
//
// Reads tb/dfp_fma_vectors.hex: one vector per line, as hex digits
//   op(1) rnd(1) A(16) B(16) C(16) expected(16) flags(2)
// where flags = {nx, nv, of, uf}. The expected results come from an
// independent IEEE 754-2008 decimal64 reference (16 digits, exponent range
// -383..384, clamping on), covering the five operations, all seven rounding
// modes, exact and inexact results, cancellation, overflow, underflow,
// subnormals, clamping, infinities and NaNs. The vectors are streamed one per
// clock, with a few clock-enable holes, and every result must appear exactly
// four enabled clocks after its operands.
`timescale 1ns/1ps
module tb_dfp_fma;
  import dfp_pkg::*;

  localparam int NVEC = 136;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en;
  logic in_valid;
  dfp_op_e in_op;
  dfp_rnd_e in_rnd;
  logic [63:0] in_a, in_b, in_c;
  logic [7:0]  in_tag;
  logic        out_valid;
  logic [63:0] out_result;
  dfp_flags_t  out_flags;
  logic [7:0]  out_tag;

  logic [271:0] vec [NVEC];
  logic stalled = 1'b0;
  int checks = 0, failures = 0;
  int issued = 0, received = 0;
  int issue_cycle [NVEC];
  int cycle = 0;

  always #5 clk = ~clk;

  dfp_fma #(.TAG_W(8)) dut (.*);

  // watchdog
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (en) cycle <= cycle + 1;

  // checker
  always @(posedge clk) begin
    if (rst_n && en && out_valid) begin
      automatic int i = int'(out_tag);
      automatic logic [63:0] exp_res = vec[i][71:8];
      automatic logic [3:0]  exp_fl  = vec[i][3:0];
      checks++;
      if (out_result !== exp_res || {out_flags.nx, out_flags.nv, out_flags.of, out_flags.uf} !== exp_fl
          || out_flags.dz) begin
        failures++;
        $display("FAIL vec %0d op=%h rnd=%h a=%h b=%h c=%h got %h fl=%b exp %h fl=%b", i,
                 vec[i][271:268], vec[i][267:264], vec[i][263:200], vec[i][199:136],
                 vec[i][135:72], out_result, out_flags, exp_res, exp_fl);
      end
      checks++;
      if (cycle - issue_cycle[i] != 4) begin
        failures++;
        $display("FAIL vec %0d latency %0d", i, cycle - issue_cycle[i]);
      end
      received++;
    end
  end

  initial begin
    $readmemh("tb/dfp_fma_vectors.hex", vec);
    en = 1'b1; in_valid = 1'b0; in_op = DOP_FMA; in_rnd = RND_RNE;
    in_a = '0; in_b = '0; in_c = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    while (issued < NVEC) begin
      @(negedge clk);
      // occasional clock-enable hole
      en = !((issued % 17) == 5 && !stalled);
      stalled = !en;
      in_valid = 1'b1;
      in_op  = dfp_op_e'(vec[issued][271:268]);
      in_rnd = dfp_rnd_e'(vec[issued][267:264]);
      in_a   = vec[issued][263:200];
      in_b   = vec[issued][199:136];
      in_c   = vec[issued][135:72];
      in_tag = 8'(issued);
      @(posedge clk);
      if (en) begin
        issue_cycle[issued] = cycle;
        issued++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0; en = 1'b1;
    repeat (10) @(posedge clk);
    checks++;
    if (received != NVEC) begin
      failures++;
      $display("FAIL received %0d of %0d", received, NVEC);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
