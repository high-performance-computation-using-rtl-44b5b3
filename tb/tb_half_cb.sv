// tb_half_cb: checks the one-input crossbar switch: its input reaches out0,
// out1, both or neither according to the two enable bits; a disabled output
// carries +0.0.
module tb_half_cb;
  import lsrdp_pkg::*;
  logic [1:0] cfg;
  fp64_t in, out0, out1;
  int checks = 0, failures = 0;

  half_cb dut (.cfg, .in, .out0, .out1);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      cfg = 2'(i % 4);
      in  = {$urandom, $urandom} | 64'h1;
      #1;
      checks += 2;
      if (out0 !== (cfg[0] ? in : 64'h0)) begin failures++; $display("FAIL out0 cfg=%0d", cfg); end
      if (out1 !== (cfg[1] ? in : 64'h0)) begin failures++; $display("FAIL out1 cfg=%0d", cfg); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
