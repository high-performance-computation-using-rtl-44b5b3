// tb_cb: checks all four settings of the 2x2 crossbar switch (bar, cross,
// multicast of in0, multicast of in1) with random data.
module tb_cb;
  import lsrdp_pkg::*;
  logic [1:0] cfg;
  fp64_t in0, in1, out0, out1;
  int checks = 0, failures = 0;

  cb dut (.cfg, .in0, .in1, .out0, .out1);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp64_t e0, e1;
    for (int i = 0; i < 200; i++) begin
      cfg = 2'(i % 4);
      in0 = {$urandom, $urandom};
      in1 = {$urandom, $urandom};
      case (cfg)
        2'd0: begin e0 = in0; e1 = in1; end
        2'd1: begin e0 = in1; e1 = in0; end
        2'd2: begin e0 = in0; e1 = in0; end
        default: begin e0 = in1; e1 = in1; end
      endcase
      #1;
      checks += 2;
      if (out0 !== e0) begin failures++; $display("FAIL out0 cfg=%0d", cfg); end
      if (out1 !== e1) begin failures++; $display("FAIL out1 cfg=%0d", cfg); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
