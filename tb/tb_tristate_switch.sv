// tb_tristate_switch: drives every legal combination of the four enables
// with random lines and compares the three outputs with the routing rules
// worked out here: HBA->CP when HBA_CP_EN; CP->PP when CP_PP_EN, else
// HBA->PP when HBA_PP_EN; CP->HBA when CP_HBA_EN, else PP->HBA when
// HBA_PP_EN; idle otherwise.
module tb_tristate_switch;
  import sw_pkg::*;

  line_t from_hba, to_hba, to_cp, from_cp, to_pp, from_pp;
  logic  hba_pp_en, hba_cp_en, cp_hba_en, cp_pp_en;
  int checks = 0, failures = 0;

  tristate_switch dut (
    .from_hba_i (from_hba), .to_hba_o (to_hba), .to_cp_o (to_cp),
    .from_cp_i (from_cp), .to_pp_o (to_pp), .from_pp_i (from_pp),
    .hba_pp_en_i (hba_pp_en), .hba_cp_en_i (hba_cp_en),
    .cp_hba_en_i (cp_hba_en), .cp_pp_en_i (cp_pp_en)
  );

  function automatic line_t rnd_line();
    line_t l;
    l.prim = prim_t'($urandom % 8);
    l.tag  = TAG_W'($urandom);
    for (int p = 0; p < int'(NPAIR); p++) l.sym[p] = sym_t'($urandom);
    return l;
  endfunction

  initial begin
    for (int it = 0; it < 400; it++) begin
      logic [3:0] en;
      line_t exp_cp, exp_pp, exp_hba;
      en = 4'($urandom);
      if (en[0] && en[3]) en[3] = 1'b0;  // never both drivers of the PP line
      {cp_pp_en, cp_hba_en, hba_cp_en, hba_pp_en} = en;
      from_hba = rnd_line(); from_cp = rnd_line(); from_pp = rnd_line();
      #1;
      exp_cp  = hba_cp_en ? from_hba : LINE_IDLE;
      exp_pp  = cp_pp_en ? from_cp : (hba_pp_en ? from_hba : LINE_IDLE);
      exp_hba = cp_hba_en ? from_cp : (hba_pp_en ? from_pp : LINE_IDLE);
      checks += 3;
      if (to_cp != exp_cp)   begin failures++; $display("FAIL to_cp en=%b", en); end
      if (to_pp != exp_pp)   begin failures++; $display("FAIL to_pp en=%b", en); end
      if (to_hba != exp_hba) begin failures++; $display("FAIL to_hba en=%b", en); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
