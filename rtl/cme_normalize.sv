// cme_normalize: first step of the CME-SVPWM modulator, v_r = V_r / Vdc.
//
// Scales the P phase reference voltages (volts) by the reciprocal of the
// inverter's voltage step, supplied at run time as inv_vdc, so that the
// rest of the modulator works in units of Vdc. A single multiplier is shared
// by the phases: one phase per clock, so a vector takes P clocks. Each
// product is rounded to FRAC fractional bits and saturated to REF_W bits.
//
// Interface: a vector is accepted on a rising clk with in_valid while
// in_ready is high (in_ready is low for the P clocks of a computation).
// out_valid pulses with the complete v_r P+1 clocks after in_valid.
// Formats: V_r signed VIN_W bits with VIN_FRAC fractional bits; inv_vdc
// unsigned INV_W bits with INV_FRAC fractional bits; v_r signed REF_W bits
// with FRAC fractional bits.
// The normalization itself is the algorithm's first step; the formats, the
// run-time reciprocal input and the shared multiplier are this design's
// choices.
module cme_normalize #(
  parameter int unsigned P        = cme_pkg::P,
  parameter int unsigned VIN_W    = cme_pkg::VIN_W,
  parameter int unsigned VIN_FRAC = cme_pkg::VIN_FRAC,
  parameter int unsigned INV_W    = cme_pkg::INV_W,
  parameter int unsigned INV_FRAC = cme_pkg::INV_FRAC,
  parameter int unsigned REF_W    = cme_pkg::REF_W,
  parameter int unsigned FRAC     = cme_pkg::FRAC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [VIN_W-1:0] v_in [P],
  input  logic        [INV_W-1:0] inv_vdc,
  output logic                    out_valid,
  output logic signed [REF_W-1:0] v_r [P]
);

  localparam int unsigned PW    = VIN_W + INV_W + 1;           // product width
  localparam int unsigned SHIFT = VIN_FRAC + INV_FRAC - FRAC;  // >= 1
  localparam int unsigned KW    = (P > 1) ? $clog2(P) : 1;
  localparam logic signed [PW-1:0] MAXV = PW'((longint'(1) <<< (REF_W - 1)) - 1);
  localparam logic signed [PW-1:0] MINV = -PW'(longint'(1) <<< (REF_W - 1));

  logic signed [VIN_W-1:0] vin_q [P];
  logic        [INV_W-1:0] inv_q;
  logic        [KW-1:0]    k;
  logic                    busy;
  logic signed [PW-1:0]    prod, scaled;
  logic signed [REF_W-1:0] res;

  // the one multiplier: phase k of the latched vector
  always_comb begin
    prod   = PW'(vin_q[k]) * $signed({1'b0, inv_q});
    scaled = (prod + PW'(longint'(1) <<< (SHIFT - 1))) >>> SHIFT;
    if (scaled > MAXV)      res = MAXV[REF_W-1:0];
    else if (scaled < MINV) res = MINV[REF_W-1:0];
    else                    res = scaled[REF_W-1:0];
  end

  assign in_ready = ~busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      k         <= '0;
      inv_q     <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < int'(P); i++) begin
        vin_q[i] <= '0;
        v_r[i]   <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          vin_q <= v_in;
          inv_q <= inv_vdc;
          busy  <= 1'b1;
          k     <= '0;
        end
      end else begin
        v_r[k] <= res;
        if (k == KW'(P - 1)) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
        end else begin
          k <= k + 1'b1;
        end
      end
    end
  end

endmodule
