// dfsr - Decimal Floating-point Status Register of the DFPU.
//
// Eight bits: round[7:5] holds the decimal rounding direction used by the
// DFP FMA (seven modes, see dfp_pkg::dfp_rnd_e) and flags[4:0] = {dz, nx, nv,
// of, uf} hold the exception flags of the most recent decimal operation.
// Decimal rounding is kept apart from the binary FSR.rd, as the decimal and
// binary rounding directions are separate; the flags are forwarded to the
// FSR, which the binary side shares.
//
// Timing: flags_in is captured on the clock edge where flags_valid = 1 and
// en = 1, and appears on flags the cycle after. Software writes the whole
// register through wr_en/wr_data (a write in the same cycle as a flag update
// wins for the round field, the flag update wins for the flags). Reset gives
// round-to-nearest-even and clear flags. How software reaches this register
// is this implementation's choice.
module dfsr
  import dfp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        flags_valid,
  input  dfp_flags_t  flags_in,
  input  logic        wr_en,
  input  logic [7:0]  wr_data,
  output dfp_rnd_e    round,
  output dfp_flags_t  flags,
  output logic [7:0]  value
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      round <= RND_RNE;
      flags <= '0;
    end else if (en) begin
      if (wr_en) begin
        round <= (wr_data[7:5] == 3'b111) ? RND_RNE : dfp_rnd_e'(wr_data[7:5]);
        flags <= dfp_flags_t'(wr_data[4:0]);
      end
      if (flags_valid) flags <= flags_in;
    end
  end

  assign value = {round, flags};
endmodule
