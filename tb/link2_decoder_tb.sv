// link2_decoder_tb: self-checking test of the Link Design II decoder.
//
// A reference encoder model in the testbench codes random words exactly as
// the transmit side does; the coded stream, with idle cycles in between, is
// fed to the decoder, whose combinational output must equal the original word
// while en is high. Both settings of the inverting multiplexer are counted.
module link2_decoder_tb;
  import link_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] bus = '0, dout;
  int checks = 0, failures = 0;
  int n_inv = 0, n_pass = 0;

  always #5 clk = ~clk;

  link2_decoder dut (.clk, .rst_n, .en, .bus, .dout);

  function automatic logic [7:0] ref_code(input logic [7:0] d, input logic [7:0] prev);
    logic [7:0] g, r;
    logic s;
    g = d ^ {1'b0, d[7:1]};
    s = g[4] & g[5];
    for (int i = 0; i < 8; i++) begin
      if (i == 4 || i == 5) r[i] = g[i];
      else                  r[i] = g[i] ^ prev[i] ^ s;
    end
    return r;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] coded, d;
    coded = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      d = (n < 256) ? 8'(n) : 8'($urandom);
      if (((d ^ (d >> 1)) & 8'h30) == 8'h30) n_inv++; else n_pass++;
      coded = ref_code(d, coded);
      bus = coded;
      en  = 1'b1;
      #1;
      checks++;
      if (dout !== d) begin
        failures++;
        if (failures < 10) $display("mismatch n=%0d bus=%h dout=%h exp=%h", n, bus, dout, d);
      end
      @(negedge clk);
      en = 1'b0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    checks++;
    if (n_inv == 0 || n_pass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
