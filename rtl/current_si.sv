// current_si - slow inward (calcium) current of the Luo-Rudy phase-I model,
//     Isi = gSi * d * f * (Vm - ESi),   gSi = 0.09 mS/cm^2,
// with its activation gate d and inactivation gate f (gate_euler each).
// ESi depends on the intracellular calcium and comes from esi_calc, valid
// from the end of PH_P1.
//
// Pipeline: PH_LUT reads the four rate tables; PH_P1 forms gSi*d; PH_P2
// forms gSi*d*f and the driving force Vm - ESi; PH_P3 multiplies them, so isi
// is valid from the end of PH_P3 until the next step's PH_P3.  The gates are
// committed at PH_COMMIT.  The conductance is the design's value; the rate
// formulas are the published model's; the stage split is a choice of this
// implementation.
module current_si
  import lr1_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t ph,
  input  fix_t   vm,
  input  fix_t   esi,
  output fix_t   isi,
  output fix_t   d,
  output fix_t   f
);
  localparam fix_t GSI = to_fix(G_SI);

  fix_t ad, bd, af, bf;
  fix_t gd, gdf, dv;

  vm_lut #(.FN(F_AD)) u_ad (.clk, .en(ph[PH_LUT]), .vm, .q(ad));
  vm_lut #(.FN(F_BD)) u_bd (.clk, .en(ph[PH_LUT]), .vm, .q(bd));
  vm_lut #(.FN(F_AF)) u_af (.clk, .en(ph[PH_LUT]), .vm, .q(af));
  vm_lut #(.FN(F_BF)) u_bf (.clk, .en(ph[PH_LUT]), .vm, .q(bf));

  gate_euler #(.INIT(gate_inf(F_AD, F_BD, VM_INIT))) u_d (.clk, .rst_n, .ph, .alpha(ad), .beta(bd), .y(d));
  gate_euler #(.INIT(gate_inf(F_AF, F_BF, VM_INIT))) u_f (.clk, .rst_n, .ph, .alpha(af), .beta(bf), .y(f));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gd <= '0; gdf <= '0; dv <= '0; isi <= '0;
    end else begin
      if (ph[PH_P1]) gd <= fmul(GSI, d);
      if (ph[PH_P2]) begin
        gdf <= fmul(gd, f);
        dv  <= vm - esi;
      end
      if (ph[PH_P3]) isi <= fmul(gdf, dv);
    end
  end
endmodule
