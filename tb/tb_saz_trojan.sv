// tb_saz_trojan: exhaustive self-check of the stuck-at-zero Trojan.
// Two instances attack bit 0 and bit 3. For every input word and trigger
// value the output must equal the input, except that the attacked bit is 0
// while the trigger is high.
module tb_saz_trojan;
  logic [3:0] d_in, d0, d3;
  logic       trigger;
  int         checks = 0, failures = 0;

  saz_trojan #(.TARGET_BIT(0)) dut0 (.d_in(d_in), .trigger(trigger), .d_out(d0));
  saz_trojan #(.TARGET_BIT(3)) dut3 (.d_in(d_in), .trigger(trigger), .d_out(d3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2; t++)
      for (int v = 0; v < 16; v++) begin
        d_in = 4'(v); trigger = 1'(t);
        #1;
        checks += 2;
        if (int'(d0) != (t ? (v & 14) : v)) failures++;
        if (int'(d3) != (t ? (v & 7)  : v)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
