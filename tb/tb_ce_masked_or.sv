// tb_ce_masked_or: random delay-cell outputs and random masks (single
// sources, several sources, empty masks); each output is compared with an
// OR computed field by field in the testbench.
//
// The rules checked are those of the block as documented in its own header
// (the source design's behaviour plus this design's stated choices); the
// stimulus, sizes and reference model are this testbench's own.
module tb_ce_masked_or;
  import pw_pkg::*;
  sym_t        din  [64];
  logic [63:0] mask [64];
  sym_t        dout [64];
  sym_t        exp_s;
  int checks = 0, failures = 0;

  ce_masked_or #(.N_IN(64), .N_OUT(64)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 60; r++) begin
      for (int i = 0; i < 64; i++) begin
        // sparse activity so that ORs are not all ones
        din[i] = ($urandom_range(0, 3) == 0) ? sym_t'($urandom_range(0, 15)) : SYM_IDLE;
        case (r % 3)
          0: mask[i] = 64'd1 << $urandom_range(0, 63);
          1: mask[i] = {$urandom, $urandom} & {$urandom, $urandom};
          default: mask[i] = (i % 5 == 0) ? 64'd0 : {$urandom, $urandom};
        endcase
      end
      #1;
      for (int o = 0; o < 64; o++) begin
        exp_s = SYM_IDLE;
        for (int i = 0; i < 64; i++)
          if (mask[o][i]) begin
            exp_s.timing  |= din[i].timing;
            exp_s.carrier |= din[i].carrier;
            exp_s.cv      |= din[i].cv;
            exp_s.data    |= din[i].data;
          end
        checks++;
        if (dout[o] !== exp_s) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
