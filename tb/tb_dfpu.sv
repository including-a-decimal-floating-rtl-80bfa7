// tb_dfpu - self-checking testbench of the decimal floating point unit
// (operand buffers + FMA + DFSR).
//
// Streams the reference vectors of tb/dfp_fma_vectors.hex (the same file as
// the FMA testbench, the first three being the add, subtract and multiply
// examples of the test programs) the way the FGU delivers them: ADD/SUB send
// A on rs1 and C on rs2, MUL sends A and B, DFMA/DFMS send A and B in one
// cycle and C on the rs2 path in the next. The rounding direction of each
// vector is first written into the DFSR by software. Checks:
//  * result value and tag, 4 enabled cycles after issue for ADD/SUB/MUL and 5
//    for DFMA/DFMS,
//  * dflags_valid one cycle after the result, with the expected flags, and
//    the DFSR flag field holding them,
//  * buffer_used only for the three-source launches,
//  * main_clken = 0 cycles (inserted at random) freeze the whole unit.
`timescale 1ns/1ps
module tb_dfpu;
  import dfp_pkg::*;

  localparam int NVEC = 136;
  localparam int TAG_W = 8;

  logic clk = 1'b0, rst_n = 1'b0, main_clken = 1'b1;
  logic valid_fx1 = 1'b0;
  dfp_op_e dec_operation = DOP_ADD;
  logic [63:0] rs1_fx1 = '0, rs2_fx1 = '0;
  logic [TAG_W-1:0] tag_fx1 = '0;
  logic result_valid, dflags_valid, buffer_used;
  logic [63:0] result_fb;
  logic [TAG_W-1:0] result_tag;
  dfp_flags_t dflags;
  logic dfsr_wr_en = 1'b0;
  logic [7:0] dfsr_wr_data = '0, dfsr_value;

  dfpu #(.TAG_W(TAG_W)) dut (.*);

  logic [271:0] vec [NVEC];
  int checks = 0, failures = 0;
  int unsigned cyc = 0;          // enabled clock count
  int n_done = 0, n_buf = 0, n_3src = 0;

  typedef struct {
    int unsigned due;
    logic [63:0] res;
    logic [4:0]  flags;
    logic [7:0]  tag;
  } exp_t;
  exp_t q[$];
  exp_t fq[$];

  always #5 clk = ~clk;

  initial begin
    #2000000;
    $display("TIMEOUT");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: sampled on every enabled clock edge
  always @(posedge clk) if (rst_n && main_clken) begin
    cyc <= cyc + 1;
    if (buffer_used) n_buf++;
    if (result_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result %h", result_fb);
      end else begin
        e = q.pop_front();
        if (e.due != cyc || result_fb !== e.res || result_tag !== e.tag) begin
          failures++;
          $display("FAIL tag %0d: cycle %0d (due %0d) result %h expected %h tag %0d",
                   e.tag, cyc, e.due, result_fb, e.res, result_tag);
        end
        fq.push_back(e);
      end
    end
    if (dflags_valid) begin
      exp_t e;
      checks++;
      e = fq.pop_front();
      if (e.due + 1 != cyc || dflags !== e.flags || dfsr_value[4:0] !== e.flags) begin
        failures++;
        $display("FAIL tag %0d flags %b expected %b (cycle %0d)", e.tag, dflags, e.flags, cyc);
      end
      n_done++;
    end
  end

  // drive one enabled cycle: inputs set at the negedge, held over disabled cycles
  task automatic step();
    logic e;
    forever begin
      e = ($urandom_range(0, 19) != 0);
      main_clken = e;
      @(negedge clk);
      if (e) break;
    end
    main_clken = 1'b1;
  endtask

  initial begin
    logic [3:0] op_n, rnd_n;
    logic [63:0] a, b, c, r;
    logic [7:0] fl;
    logic [2:0] cur_rnd;
    $readmemh("tb/dfp_fma_vectors.hex", vec);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    cur_rnd = 3'd0;
    for (int i = 0; i < NVEC; i++) begin
      {op_n, rnd_n, a, b, c, r, fl} = vec[i];
      if (rnd_n[2:0] != cur_rnd) begin
        // software write of the rounding direction; let older results drain
        // first so that their flags are not overwritten
        valid_fx1 = 1'b0;
        while (q.size() != 0 || fq.size() != 0) step();
        dfsr_wr_en = 1'b1;
        dfsr_wr_data = {rnd_n[2:0], 5'd0};
        step();
        dfsr_wr_en = 1'b0;
        cur_rnd = rnd_n[2:0];
      end
      dec_operation = dfp_op_e'(op_n[2:0]);
      valid_fx1 = 1'b1;
      tag_fx1 = 8'(i);
      rs1_fx1 = a;
      rs2_fx1 = (op_n[2:0] == DOP_MUL || op_n[2:1] == 2'b00) ? b : c;
      q.push_back('{cyc + ((op_n[2:1] == 2'b00) ? 5 : 4), r, {1'b0, fl[3:0]}, 8'(i)});
      step();
      if (op_n[2:1] == 2'b00) begin
        n_3src++;
        valid_fx1 = 1'b0;
        dec_operation = DOP_ADD;
        rs1_fx1 = 64'hDEAD_BEEF_DEAD_BEEF;
        rs2_fx1 = c;
        step();
      end
      valid_fx1 = 1'b0;
    end
    valid_fx1 = 1'b0;
    repeat (20) step();
    checks++;
    if (n_done != NVEC || q.size() != 0) begin
      failures++;
      $display("FAIL %0d of %0d operations completed", n_done, NVEC);
    end
    checks++;
    if (n_buf != n_3src || n_3src == 0) begin
      failures++;
      $display("FAIL buffer used %0d times for %0d three-source operations", n_buf, n_3src);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
