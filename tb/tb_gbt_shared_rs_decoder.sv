// tb_gbt_shared_rs_decoder: one decoder time-shared by three links.
//
// Each frame clock, every link gets its own random codeword pair (reference
// encoder of tb_rs_ref_pkg) with 0..2 symbol errors per codeword, and a
// random in_valid.  Each link's output must be its own corrected header and
// scrambled bits, with its own valid and corrected flags, exactly two frame
// clocks later.
module tb_gbt_shared_rs_decoder;
  import gbt_pkg::*;
  import tb_rs_ref_pkg::*;

  localparam int N = 3;
  logic clk_frame = 1'b0, clk_word = 1'b0, rst = 1'b1;
  always #12 clk_frame = ~clk_frame;
  always #4  clk_word  = ~clk_word;

  logic        in_valid [N];
  logic [59:0] code_a [N], code_b [N];
  logic [3:0]  hdr [N];
  logic [83:0] scr [N];
  logic        out_valid [N], corrected [N], uncorrectable [N];
  int          checks = 0, failures = 0;

  gbt_shared_rs_decoder #(.N_LINKS(N)) dut (.clk_frame, .clk_word, .rst, .in_valid, .code_a,
    .code_b, .hdr, .scr, .out_valid, .corrected, .uncorrectable);

  typedef struct { logic [87:0] info; bit v; bit err; } exp_t;
  exp_t hist [$];      // one entry per frame: N links packed

  function automatic logic [59:0] add_errors(logic [59:0] c, int n);
    int p0 = $urandom_range(0, 14);
    int p1 = (p0 + $urandom_range(1, 14)) % 15;
    if (n > 0) c[p0*4 +: 4] ^= 4'($urandom_range(1, 15));
    if (n > 1) c[p1*4 +: 4] ^= 4'($urandom_range(1, 15));
    return c;
  endfunction

  exp_t q [N][$];

  initial begin
    repeat (3000) @(posedge clk_frame);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init();
    for (int l = 0; l < N; l++) begin in_valid[l] = 0; code_a[l] = 0; code_b[l] = 0; end
    repeat (3) @(posedge clk_frame);
    rst <= 1'b0;
    for (int f = 0; f < 400; f++) begin
      @(negedge clk_frame);
      for (int l = 0; l < N; l++) begin
        exp_t e;
        automatic int ea = $urandom_range(0, 2), eb = $urandom_range(0, 2);
        e.info = {$urandom, $urandom, 24'($urandom)};
        e.v    = ($urandom_range(0, 7) != 0);
        e.err  = (ea + eb) > 0;
        code_a[l]   = add_errors(encode(e.info[87:44]), ea);
        code_b[l]   = add_errors(encode(e.info[43:0]), eb);
        in_valid[l] = e.v;
        q[l].push_back(e);
      end
      @(posedge clk_frame); #1;
      // the frame presented two frame clocks ago is at the output now
      if (f >= 2) begin
        for (int l = 0; l < N; l++) begin
          automatic exp_t e = q[l].pop_front();
          checks++;
          if (out_valid[l] !== e.v) begin failures++; $display("f=%0d link %0d valid", f, l); end
          if (e.v) begin
            checks++;
            if ({hdr[l], scr[l]} !== e.info || corrected[l] !== e.err || uncorrectable[l]) begin
              failures++; $display("f=%0d link %0d data/flags wrong", f, l);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
