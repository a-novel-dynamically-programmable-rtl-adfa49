// tb_bus_interface: self-checking testbench of a bus interface.
//
// Three interfaces share one bus: A transmits only, B transmits and has two
// receivers, C (an output-port style interface) has one receiver. The
// configuration chain C -> B is loaded by shifting codes in least
// significant bit first and committing. Each system clock A and B send
// random bits; every receiver must deliver, in the next reload slot, the bit
// of the transmitter whose code it holds (VALID high), or 0 with VALID low
// when it holds code 0. The program is changed several times while the
// interfaces run (A to B, B listening to itself, broadcast of one
// transmitter to all three receivers, disconnection); each change must take
// effect at the first system clock after the commit.
module tb_bus_interface;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [6:0] slot;
  logic [3:0] bit_idx;
  logic reload, step, last, word_tick;
  logic cfg_shift = 1'b0, cfg_commit = 1'b0, cfg_sdi = 1'b0;
  logic [2:0] chain;
  logic [2:0] chips;
  logic signed [2:0] bus;
  logic da = 1'b0, db = 1'b0;
  logic [0:0] ard, arv, crd, crv;
  logic [1:0] brd, brv;
  logic unused_c;
  int checks = 0, failures = 0;
  localparam logic [6:0] CA = 7'd11, CB = 7'd97;

  dpaa_timing u_t (.clk, .rst_n, .slot, .bit_idx, .reload, .step, .last, .word_tick);
  ma_bus #(.N(2), .BUS_W(3)) u_bus (.chips(chips[1:0]), .bus);

  bus_interface #(.HAS_TX(1'b1), .N_RX(0), .TX_CODE(CA), .BUS_W(3)) u_a (
    .clk, .rst_n, .reload, .step, .last, .tx_data(da), .tx_chip(chips[0]), .bus,
    .cfg_shift, .cfg_commit, .cfg_sdi(1'b0), .cfg_sdo(unused_c), .rx_data(ard), .rx_valid(arv));
  bus_interface #(.HAS_TX(1'b1), .N_RX(2), .TX_CODE(CB), .BUS_W(3)) u_b (
    .clk, .rst_n, .reload, .step, .last, .tx_data(db), .tx_chip(chips[1]), .bus,
    .cfg_shift, .cfg_commit, .cfg_sdi(chain[2]), .cfg_sdo(chain[0]), .rx_data(brd), .rx_valid(brv));
  bus_interface #(.HAS_TX(1'b0), .N_RX(1), .BUS_W(3)) u_c (
    .clk, .rst_n, .reload, .step, .last, .tx_data(1'b0), .tx_chip(chips[2]), .bus,
    .cfg_shift, .cfg_commit, .cfg_sdi(cfg_sdi), .cfg_sdo(chain[2]), .rx_data(crd), .rx_valid(crv));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100 * 128 * 8) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receivers in chain order: 0 = B.a, 1 = B.b, 2 = C
  logic [6:0] prog [3];

  task automatic load_program(input logic [6:0] p0, input logic [6:0] p1, input logic [6:0] p2);
    logic [20:0] v;
    v = {p2, p1, p0};
    for (int k = 0; k < 21; k++) begin
      @(negedge clk) begin cfg_sdi = v[k]; cfg_shift = 1'b1; end
    end
    @(negedge clk) begin cfg_shift = 1'b0; cfg_commit = 1'b1; end
    @(negedge clk) cfg_commit = 1'b0;
    prog[0] = p0; prog[1] = p1; prog[2] = p2;
  endtask

  function automatic bit exp_bit(input logic [6:0] c, input bit a, input bit b);
    return (c == CA) ? a : (c == CB) ? b : 1'b0;
  endfunction

  initial begin
    bit pa, pb;     // bits sent in the previous system clock
    int n_bcast = 0;
    prog[0] = '0; prog[1] = '0; prog[2] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int r = 0; r < 6; r++) begin
      // reprogram in the middle of a system clock
      @(negedge clk iff (slot == 7'd20));
      case (r)
        0: load_program(CA, CB, CA);
        1: load_program(CB, CA, CB);
        2: load_program(CA, CA, CA);   // broadcast
        3: load_program(7'd0, CB, 7'd0);
        4: load_program(CB, CB, CA);
        default: load_program(7'd5, 7'd0, CB);  // 5: used by nobody
      endcase
      for (int c = 0; c < 12; c++) begin
        @(negedge clk iff reload);
        // in the reload slot the decision on the previous system clock is out
        if (c > 0) begin
          checks += 6;
          for (int i = 0; i < 2; i++) begin
            if (brv[i] != (prog[i] == CA || prog[i] == CB)) failures++;
            if (brd[i] != exp_bit(prog[i], pa, pb)) failures++;
          end
          if (crv[0] != (prog[2] == CA || prog[2] == CB)) failures++;
          if (crd[0] != exp_bit(prog[2], pa, pb)) failures++;
          if (prog[0] == prog[1] && prog[1] == prog[2] && brv[0] && brv[1] && crv[0]) n_bcast++;
        end
        da = 1'($urandom); db = 1'($urandom);
        pa = da; pb = db;
      end
    end
    checks++;
    if (n_bcast == 0) failures++;
    $display("broadcast cycles %0d", n_bcast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
