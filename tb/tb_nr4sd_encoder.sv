// tb_nr4sd_encoder -- exhaustive check of the NR4SD digit encoder, both digit
// sets: for every stored 2-bit digit the selection signals must be the one-hot
// code of the digit's value (all zero for 0).
module tb_nr4sd_encoder;
  import nr4sd_pkg::*;

  logic [1:0] digit;
  nr_sel_t    sel_m, sel_p;
  int checks = 0, failures = 0;

  nr4sd_encoder #(.VARIANT(NR4SD_MINUS)) dut_m (.digit(digit), .sel(sel_m));
  nr4sd_encoder #(.VARIANT(NR4SD_PLUS))  dut_p (.digit(digit), .sel(sel_p));

  function automatic nr_sel_t expect_sel(int v);
    nr_sel_t s = '0;
    s.one_p = (v == 1);
    s.one_m = (v == -1);
    s.two   = (v == 2) || (v == -2);
    return s;
  endfunction

  initial begin
    #1000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 4; d++) begin
      int vm, vp;
      digit = 2'(d);
      #1;
      vm = -2 * int'(digit[1]) + int'(digit[0]);
      vp =  2 * int'(digit[1]) - int'(digit[0]);
      checks += 2;
      if (sel_m !== expect_sel(vm)) begin
        failures++;
        $display("NR4SD- digit %b: sel %b expected %b", digit, sel_m, expect_sel(vm));
      end
      if (sel_p !== expect_sel(vp)) begin
        failures++;
        $display("NR4SD+ digit %b: sel %b expected %b", digit, sel_p, expect_sel(vp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
