// nr4sd_premult_top -- pre-encoded NR4SD multiplier system.
//
// A DSP kernel multiplies a stream of run-time operands A by fixed
// coefficients B.  Here the coefficients are converted off-line into the
// Non-Redundant radix-4 Signed-Digit form and stored in a ROM, so the
// multiplier needs no Booth encoder on its critical path: each stored 2-bit
// digit only expands, in two gate levels, into the selection signals of a
// partial product generator.  Blocks: coef_rom (DEPTH x (N+1) bits,
// synchronous), nr4sd_multiplier (encoders, partial product generators, CSA
// tree, CLA adder) and mult_ctrl (the sequencing state machine).
//
// Operation: pulse 'start' with base_addr and count while idle.  From the
// next cycle on, the controller reads one coefficient per cycle and raises
// 'a_take' in each such cycle; a_in must then hold the operand for that
// coefficient.  Two cycles after each a_take, p = a_in * B[addr] appears with
// p_valid (one product per cycle; p_last and done mark the final one).
// Pipeline: ROM output register and A register (stage 1), product register
// (stage 2).
//
// Beside the datapath, and independent of it, an nr4sd_preencoder converts a
// 2's complement coefficient on coef_in into the (N+1)-bit word the ROM stores
// (coef_enc, combinational), for building ROM images with INIT_FILE.
//
// The datapath follows the published system diagram; the interface, the
// registers around the combinational multiplier, the controller and the side
// pre-encoder ports are this design's own.
module nr4sd_premult_top
  import nr4sd_pkg::*;
#(
  parameter int          N         = 16,
  parameter int          DEPTH     = 512,
  parameter nr_variant_e VARIANT   = NR4SD_MINUS,
  parameter int unsigned COEF_SET  = 0,
  parameter string       INIT_FILE = "",
  localparam int         AW        = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [AW-1:0]  base_addr,
  input  logic [AW:0]    count,
  input  logic [N-1:0]   a_in,
  output logic           a_take,
  output logic           busy,
  output logic [2*N-1:0] p,
  output logic           p_valid,
  output logic           p_last,
  output logic           done,
  input  logic [N-1:0]   coef_in,    // coefficient to pre-encode
  output logic [N:0]     coef_enc    // its ROM word
);

  localparam int LAT = 2;

  logic          rom_cen_n;
  logic [AW-1:0] rom_addr;
  logic [N:0]    rom_dout;
  logic [N-1:0]  a_q;
  logic [2*N-1:0] p_comb;
  logic          s1_valid;

  mult_ctrl #(.AW(AW), .LAT(LAT)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .base_addr (base_addr),
    .count     (count),
    .cen_n     (rom_cen_n),
    .addr      (rom_addr),
    .issue     (a_take),
    .out_valid (p_valid),
    .out_last  (p_last),
    .busy      (busy),
    .done      (done)
  );

  coef_rom #(
    .N(N), .DEPTH(DEPTH), .VARIANT(VARIANT),
    .COEF_SET(COEF_SET), .INIT_FILE(INIT_FILE)
  ) u_rom (
    .clk   (clk),
    .cen_n (rom_cen_n),
    .addr  (rom_addr),
    .dout  (rom_dout)
  );

  // Stage 1: A is registered in the same edge that reads the ROM.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q      <= '0;
      s1_valid <= 1'b0;
    end else begin
      s1_valid <= a_take;
      if (a_take) a_q <= a_in;
    end
  end

  nr4sd_multiplier #(.N(N), .VARIANT(VARIANT)) u_mult (
    .a     (a_q),
    .b_enc (rom_dout),
    .p     (p_comb)
  );

  // Stage 2: product register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        p <= '0;
    else if (s1_valid) p <= p_comb;
  end

  nr4sd_preencoder #(.N(N), .VARIANT(VARIANT)) u_preenc (
    .b     (coef_in),
    .b_enc (coef_enc)
  );

endmodule
