// tb_gbt_descrambler: the descrambler must undo a bit-serial scrambler.
//
// A bit-serial model scrambles random SC/D words (s[n] = d[n]^s[n-19]^s[n-21]
// per 21-bit lane, bit j of a lane word = element 21*t+j).  The model starts
// from a random state while the descrambler starts from zero, so the first
// output frame may be wrong; from the second frame on, every frame must be
// recovered exactly (self-synchronisation), with one frame clock latency.
module tb_gbt_descrambler;
  import gbt_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        in_valid, out_valid;
  logic [3:0]  hdr_in, hdr_out, sc_out;
  logic [83:0] scr_in;
  logic [79:0] data_out;
  int          checks = 0, failures = 0;

  gbt_descrambler dut (.clk, .rst, .in_valid, .hdr_in, .scr_in, .hdr_out, .sc_out,
                       .data_out, .out_valid);

  bit lane_hist [4][$];

  function automatic logic [83:0] scramble(input logic [83:0] user);
    logic [83:0] r;
    for (int k = 0; k < 4; k++)
      for (int j = 0; j < 21; j++) begin
        int n = lane_hist[k].size();
        bit s = user[21*k + j] ^ lane_hist[k][n-19] ^ lane_hist[k][n-21];
        lane_hist[k].push_back(s);
        r[21*k + j] = s;
      end
    return r;
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [83:0] user;
    for (int k = 0; k < 4; k++) for (int i = 0; i < 21; i++) lane_hist[k].push_back(1'($urandom));
    in_valid = 0; hdr_in = 0; scr_in = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int f = 0; f < 150; f++) begin
      @(negedge clk);
      user     = {$urandom, $urandom, 20'($urandom)};
      hdr_in   = 4'($urandom);
      scr_in   = scramble(user);
      in_valid = 1'b1;
      @(posedge clk); #1;
      if (f >= 1) begin
        checks++;
        if (!out_valid || {sc_out, data_out} !== user || hdr_out !== hdr_in) begin
          failures++;
          $display("frame %0d: got %h expected %h", f, {sc_out, data_out}, user);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
