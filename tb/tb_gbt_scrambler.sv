// tb_gbt_scrambler: checks the scrambler against a bit-serial model.
//
// The model keeps each lane's scrambled stream as a list of bits and applies
// s[n] = d[n] ^ s[n-19] ^ s[n-21] one bit at a time, bit j of a lane word
// being element 21*t + j.  Random SC and D words are sent for 200 frames,
// with frame_valid sometimes low (the state must then hold); the header
// must come out unchanged with one frame clock of latency.
module tb_gbt_scrambler;
  import gbt_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic              fv;
  logic [3:0]        hdr_in, hdr_out;
  logic [3:0]        sc_in;
  logic [79:0]       data_in;
  logic [83:0]       scr_out;
  logic              out_valid;
  int                checks = 0, failures = 0;

  gbt_scrambler dut (.clk, .rst, .frame_valid(fv), .hdr_in, .sc_in, .data_in,
                     .hdr_out, .scr_out, .out_valid);

  bit lane_hist [4][$];     // scrambled bits so far, per lane

  function automatic logic [83:0] model(input logic [83:0] user);
    logic [83:0] r;
    for (int k = 0; k < 4; k++)
      for (int j = 0; j < 21; j++) begin
        int n = lane_hist[k].size();
        bit t19 = (n >= 19) ? lane_hist[k][n-19] : 1'b0;
        bit t21 = (n >= 21) ? lane_hist[k][n-21] : 1'b0;
        bit s   = user[21*k + j] ^ t19 ^ t21;
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
    logic [83:0] exp_scr;
    logic [3:0]  exp_hdr;
    fv = 0; hdr_in = 0; sc_in = 0; data_in = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int f = 0; f < 200; f++) begin
      @(negedge clk);
      fv      = ($urandom_range(0, 9) != 0);
      hdr_in  = 4'($urandom);
      sc_in   = 4'($urandom);
      data_in = {$urandom, $urandom, 16'($urandom)};
      if (f < 5) data_in = '0;   // an all-zero input must still be scrambled
      if (fv) begin
        exp_scr = model({sc_in, data_in});
        exp_hdr = hdr_in;
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid !== fv) begin failures++; $display("valid mismatch f=%0d", f); end
      if (fv) begin
        checks++;
        if (scr_out !== exp_scr || hdr_out !== exp_hdr) begin
          failures++;
          $display("frame %0d: got %h/%h expected %h/%h", f, hdr_out, scr_out, exp_hdr, exp_scr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
