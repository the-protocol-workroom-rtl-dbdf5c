// tb_ce_mux_array: random tap outputs and random selections; every output
// must equal the selected input.
//
// The rules checked are those of the block as documented in its own header
// (the source design's behaviour plus this design's stated choices); the
// stimulus, sizes and reference model are this testbench's own.
module tb_ce_mux_array;
  import pw_pkg::*;
  sym_t       din  [64];
  logic [5:0] sel  [64];
  sym_t       dout [64];
  int checks = 0, failures = 0;

  ce_mux_array #(.N_IN(64), .N_OUT(64)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50) begin
      for (int i = 0; i < 64; i++) begin
        din[i] = sym_t'($urandom_range(0, 15));
        sel[i] = 6'($urandom_range(0, 63));
      end
      #1;
      for (int o = 0; o < 64; o++) begin
        checks++;
        if (dout[o] !== din[sel[o]]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
