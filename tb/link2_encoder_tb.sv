// link2_encoder_tb: self-checking test of the Link Design II encoder.
//
// Drives random 8-bit words (with random idle cycles) and compares the bus,
// one cycle after each enabled word, with a reference model written from the
// coding rule: Gray bits 4 and 5 sent plain, the other six sent as
// previous-coded XOR Gray, inverted when Gray bits 4 and 5 are both 1. It also
// checks the bus holds while en is low, and counts both settings of the
// inverting multiplexer so that each is seen.
module link2_encoder_tb;
  import link_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] din = '0, bus;
  int checks = 0, failures = 0;
  int n_inv = 0, n_pass = 0;

  always #5 clk = ~clk;

  link2_encoder dut (.clk, .rst_n, .en, .din, .bus);

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
    logic [7:0] model;
    model = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    if (bus !== 8'h00) failures++;
    checks++;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      din = 8'($urandom);
      if (n < 256) din = 8'(n);       // every value once
      if (en) begin
        model = ref_code(din, model);
        if (((din ^ (din >> 1)) & 8'h30) == 8'h30) n_inv++; else n_pass++;
      end
      @(negedge clk);                 // bus settled after the edge
      checks++;
      if (bus !== model) begin
        failures++;
        if (failures < 10) $display("mismatch n=%0d din=%h bus=%h exp=%h", n, din, bus, model);
      end
      en = 1'b0;
    end
    checks++;
    if (n_inv == 0 || n_pass == 0) begin
      failures++;
      $display("multiplexer setting never used: inv=%0d pass=%0d", n_inv, n_pass);
    end
    $display("inverted=%0d plain=%0d", n_inv, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
