// tb_ma_bus: self-checking testbench of the multiple access bus summation.
//
// Random chip patterns for 54 transmitters (all zero, all one, random) are
// applied; the bus value must be the number of 0 chips minus the number of
// 1 chips.
module tb_ma_bus;
  localparam int N = 54;
  logic [N-1:0] chips;
  logic signed [6:0] bus;
  int checks = 0, failures = 0;

  ma_bus #(.N(N)) dut (.chips, .bus);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int r = 0; r < 2000; r++) begin
      case (r)
        0: chips = '0;
        1: chips = '1;
        default: chips = {$urandom, $urandom};
      endcase
      #1;
      e = 0;
      for (int i = 0; i < N; i++) e += chips[i] ? -1 : 1;
      checks++;
      if (int'(bus) != e) begin
        failures++;
        if (failures < 10) $display("chips %h: bus %0d expected %0d", chips, bus, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
