// tb_cla_adder -- carry-lookahead adder check at widths 32 and 13: sum and
// carry-out must equal a + b + cin, for carry-chain corner cases and random
// operands.
module tb_cla_adder;
  logic [31:0] a32, b32, s32;
  logic [12:0] a13, b13, s13;
  logic        cin, co32, co13;
  int checks = 0, failures = 0;

  cla_adder #(.W(32)) dut32 (.a(a32), .b(b32), .cin(cin), .sum(s32), .cout(co32));
  cla_adder #(.W(13)) dut13 (.a(a13), .b(b13), .cin(cin), .sum(s13), .cout(co13));

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [32:0] e32;
      logic [13:0] e13;
      case (t)
        0: begin a32 = '1; b32 = '0; cin = 1'b1; end
        1: begin a32 = '1; b32 = '1; cin = 1'b1; end
        2: begin a32 = 32'h5555_5555; b32 = 32'hAAAA_AAAA; cin = 1'b1; end
        3: begin a32 = '0; b32 = '0; cin = 1'b0; end
        default: begin a32 = $urandom; b32 = $urandom; cin = 1'($urandom); end
      endcase
      a13 = a32[12:0];
      b13 = b32[12:0];
      #1;
      e32 = {1'b0, a32} + {1'b0, b32} + 33'(cin);
      e13 = {1'b0, a13} + {1'b0, b13} + 14'(cin);
      checks += 2;
      if ({co32, s32} !== e32) begin
        failures++;
        $display("W=32 %h+%h+%b: got %h expected %h", a32, b32, cin, {co32, s32}, e32);
      end
      if ({co13, s13} !== e13) begin
        failures++;
        $display("W=13 %h+%h+%b: got %h expected %h", a13, b13, cin, {co13, s13}, e13);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
