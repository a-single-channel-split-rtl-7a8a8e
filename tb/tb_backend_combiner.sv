// tb_backend_combiner: feeds analog residues through an ideal model of the
// seven backend 1.5-bit stages and the 2-bit flash, and checks that the
// combined digital value equals the exact radix-2 sum of the codes and lies
// within one flash step (2^-8) of the analog value.
`timescale 1ns/1ps
module tb_backend_combiner;
  import cal_pkg::*;
  dec_t d [NBACK];
  logic [1:0] flash;
  data_t dres;
  int checks = 0, failures = 0;

  backend_combiner dut (.d(d), .flash(flash), .dres(dres));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v, va, exact, got;
    for (int i = 0; i < 3000; i++) begin
      va = (real'($urandom_range(0, 2000000)) / 1000000.0 - 1.0) * 0.99;
      v = va;
      exact = 0.0;
      for (int j = 0; j < NBACK; j++) begin
        d[j] = v > 0.25 ? dec_t'(1) : (v < -0.25 ? dec_t'(-1) : dec_t'(0));
        exact += real'(d[j]) / (2.0 ** (j + 1));
        v = 2.0 * v - real'(d[j]);
      end
      flash = v > 0.5 ? 2'd3 : (v > 0.0 ? 2'd2 : (v > -0.5 ? 2'd1 : 2'd0));
      exact += (real'(flash) * 0.5 - 0.75) / (2.0 ** NBACK);
      #1;
      got = real'(dres) / (2.0 ** DATA_FRAC);
      checks += 2;
      if (got != exact) begin failures++; $display("got %f exact %f", got, exact); end
      if (got - va > 1.0 / 256.0 || va - got > 1.0 / 256.0) begin
        failures++; $display("analog %f digital %f", va, got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
