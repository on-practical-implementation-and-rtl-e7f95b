// tb_extrinsic_scaler: exhaustive test of the extrinsic scaler: with en = 1
// every 8-bit input must come out as round(x * 230/256); with en = 0 it must
// be passed unchanged.
module tb_extrinsic_scaler;
  import tb_ref_pkg::*;

  logic              en;
  logic signed [7:0] din, dout;
  int checks = 0, failures = 0;

  extrinsic_scaler dut (.en(en), .din(din), .dout(dout));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int x = -128; x < 128; x++) begin
        int exp_o;
        en = e[0]; din = 8'(x);
        #1;
        exp_o = e ? scale_ref(x) : x;
        checks++;
        if (int'(dout) != exp_o) begin
          failures++;
          if (failures < 10) $display("FAIL en=%0d x=%0d got=%0d exp=%0d", e, x, dout, exp_o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
