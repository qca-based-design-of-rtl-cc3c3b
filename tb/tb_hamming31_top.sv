// tb_hamming31_top: end-to-end test of the Hamming (3,1) link.
// The test bench plays the channel: it takes the sent word tx_code, XORs a
// channel error pattern into it and returns it on rx_code. It first runs
// every data bit with every one of the eight error patterns, then a run of
// random transmissions. Expected values are worked out here without the
// design's equations: the sent word must be three copies of the data bit,
// the syndrome must name the flipped position for a single error, and the
// corrected word must be three copies of the majority of the received bits
// (which equals the sent word whenever at most one bit was flipped).
// Each mechanism of the link is counted: clean transfer (decoder O0),
// correction at positions 1, 2 and 3, and a multi-bit error that the code
// cannot repair; one that never happens counts as a failure.
module tb_hamming31_top;
  import hamming31_pkg::*;

  localparam int N_RANDOM = 1000;

  logic             d1, edp1, edp2, d1_out;
  codeword_t        tx_code, rx_code, cm;
  logic [1:0]       garbage;
  position_onehot_t dec_o;
  code_vec_t        err;

  int checks = 0, failures = 0;
  int n_clean = 0, n_multi = 0;
  int n_fix [1:3] = '{0, 0, 0};

  hamming31_top dut (
    .d1(d1), .tx_code(tx_code), .rx_code(rx_code),
    .edp1(edp1), .edp2(edp2), .garbage(garbage),
    .dec_o(dec_o), .cm(cm), .d1_out(d1_out)
  );

  // The channel.
  assign rx_code = tx_code ^ err;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: d1=%b err=%b tx=%b rx=%b edp2,1=%b%b O=%b cm=%b d1_out=%b",
               what, d1, err, tx_code, rx_code, edp2, edp1, dec_o, cm, d1_out);
    end
  endtask

  task automatic send(input logic d, input logic [2:0] e);
    int ones, pos;
    logic maj;
    d1  = d;
    err = e;
    #10;
    ones = $countones(e);
    check("sent word", tx_code === {3{d}});
    check("garbage", garbage === {2{rx_code[2]}});
    maj = ($countones(rx_code) >= 2);
    check("corrected word", cm === {3{maj}});
    check("data out", d1_out === maj);
    if (ones == 0) begin
      n_clean++;
      check("clean syndrome", {edp2, edp1} === 2'b00 && dec_o === 4'b0001);
      check("clean data", d1_out === d);
    end else if (ones == 1) begin
      pos = (e == 3'b001) ? 1 : (e == 3'b010) ? 2 : 3;
      n_fix[pos]++;
      check("syndrome", {edp2, edp1} === 2'(pos));
      check("decoder", dec_o === 4'(1 << pos));
      check("repaired word", cm === tx_code);
      check("repaired data", d1_out === d);
    end else begin
      n_multi++;
    end
  endtask

  initial begin
    // Exhaustive sweep.
    for (int d = 0; d < 2; d++)
      for (int e = 0; e < 8; e++)
        send(d[0], 3'(e));
    // Random traffic, mostly single or no errors.
    for (int i = 0; i < N_RANDOM; i++) begin
      logic [2:0] e;
      case ($urandom_range(0, 7))
        0, 1, 2: e = 3'b000;
        3, 4, 5: e = 3'(1 << $urandom_range(0, 2));
        default: e = 3'($urandom);
      endcase
      send(1'($urandom), e);
    end
    $display("clean=%0d fixed@1=%0d fixed@2=%0d fixed@3=%0d multi=%0d",
             n_clean, n_fix[1], n_fix[2], n_fix[3], n_multi);
    checks++; if (n_clean == 0)  begin failures++; $display("FAIL no clean transfer");     end
    checks++; if (n_fix[1] == 0) begin failures++; $display("FAIL no repair at position 1"); end
    checks++; if (n_fix[2] == 0) begin failures++; $display("FAIL no repair at position 2"); end
    checks++; if (n_fix[3] == 0) begin failures++; $display("FAIL no repair at position 3"); end
    checks++; if (n_multi == 0)  begin failures++; $display("FAIL no multi-bit error");      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
