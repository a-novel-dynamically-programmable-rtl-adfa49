// tb_bus_tx: self-checking testbench of the transmitter.
//
// Two transmitters with different ROM codes are run through 200 system
// clocks (one reload slot and 127 chip slots each) with a random data bit
// per system clock. In every chip slot the modulated chip must equal the
// data bit XOR the code chip of the reference model.
module tb_bus_tx;
  import pn_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, step = 1'b0, data = 1'b0;
  logic [1:0] chip_out;
  int checks = 0, failures = 0;
  localparam logic [6:0] C0 = 7'h01, C1 = 7'h5a;

  bus_tx #(.CODE(C0)) dut0 (.clk, .rst_n, .load, .step, .data, .chip_out(chip_out[0]));
  bus_tx #(.CODE(C1)) dut1 (.clk, .rst_n, .load, .step, .data, .chip_out(chip_out[1]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200 * 128 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    code_seq_t s0, s1;
    s0 = pn_seq(C0); s1 = pn_seq(C1);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 200; c++) begin
      @(negedge clk) begin load = 1'b1; step = 1'b0; data = 1'($urandom); end
      for (int t = 0; t < 127; t++) begin
        @(negedge clk) begin load = 1'b0; step = 1'b1; end
        checks += 2;
        if (chip_out[0] != (data ^ s0[t])) failures++;
        if (chip_out[1] != (data ^ s1[t])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
