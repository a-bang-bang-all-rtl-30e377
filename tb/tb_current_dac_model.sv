// tb_current_dac_model: drives the DAC model through the fine decoder with
// random coarse, fine and pedestal settings and compares the summed current with
// coarse*64 + fine + 272 per pedestal source (in fine-LSB units).
`timescale 1ns/1ps
module tb_current_dac_model;
  logic [5:0]  coarse;
  logic [9:0]  fine;
  logic [1:0]  ped;
  logic [3:0]  fb;
  logic [62:0] fu;
  logic [15:0] i_units;
  int checks = 0, failures = 0;

  fine_dac_decoder  u_dec (.code(fine), .bin(fb), .unary(fu));
  current_dac_model dut (.coarse, .fine_bin(fb), .fine_unary(fu), .pedestal(ped), .i_units);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int exp_i;
      coarse = (i < 4) ? (i[0] ? 6'd63 : 6'd0) : 6'($urandom);
      fine   = (i < 4) ? (i[1] ? 10'd1023 : 10'd0) : 10'($urandom);
      case ($urandom_range(0, 2))
        0: ped = 2'b00;
        1: ped = 2'b01;
        default: ped = 2'b11;
      endcase
      #1;
      exp_i = int'(coarse) * 64 + int'(fine) + 272 * $countones(ped);
      checks++;
      if (int'(i_units) != exp_i) begin
        failures++;
        if (failures < 10) $display("FAIL coarse %0d fine %0d ped %b: %0d expected %0d", coarse, fine, ped, i_units, exp_i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
