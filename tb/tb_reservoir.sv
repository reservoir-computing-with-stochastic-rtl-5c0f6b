// Test of the reservoir (6 neurons, 2 recurrent synapses each). Phase 1: the
// input synapses carry weight +1 and the recurrent ones 0; input 1 drives all
// neurons high, input 0 drives them low. Phase 2 checks the wiring: only
// recurrent synapse 0 is +1; one feedback stream j is held at 1 and the others
// at 0, so exactly the neurons whose first source is j must go high. The
// expected sources come from the testbench's own copy of the small-world rule.
module tb_reservoir;
  localparam int unsigned N = 6, K = 2, M = K + 1;
  localparam int unsigned IW = $clog2(N * M);
  logic clk = 0, rst_n = 0, w_we = 0, u_bit = 0;
  logic [IW-1:0] w_idx = '0;
  logic [7:0] w_data = '0;
  logic [N-1:0] fb_bits = '0, x_bits;
  int checks = 0, failures = 0;

  reservoir #(.N(N), .K_REC(K), .STATES(16)) dut (
    .clk(clk), .rst_n(rst_n), .w_we(w_we), .w_idx(w_idx), .w_data(w_data),
    .u_bit(u_bit), .fb_bits(fb_bits), .x_bits(x_bits));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Ring lattice offsets -K/2..-1, +1..+K/2; a hashed fifth of the links
  // jump half way round the ring; a self link moves to the next neuron.
  function automatic int src_ref(int n, int k);
    int off, s;
    longint unsigned h;
    off = (k < K / 2) ? -(k + 1) : (k - K / 2 + 1);
    s = (n + off + N) % N;
    h = ((longint'(n * 31 + k * 17 + 11) * 64'd2654435761) & 64'hFFFF_FFFF) >> 7;
    if (h % 5 == 0) s = (s + N / 2) % N;
    if (s == n) s = (n + 1) % N;
    return s;
  endfunction

  task automatic set_w(input int n, input int s, input logic [7:0] w);
    @(negedge clk) begin w_we = 1; w_idx = IW'(n * M + s); w_data = w; end
    @(negedge clk) w_we = 0;
  endtask

  task automatic measure(output int ones [N]);
    for (int n = 0; n < N; n++) ones[n] = 0;
    repeat (200) @(negedge clk);
    for (int c = 0; c < 10000; c++) begin
      @(negedge clk);
      for (int n = 0; n < N; n++) ones[n] += int'(x_bits[n]);
    end
  endtask

  initial begin
    int ones [N];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < N; n++) begin
      set_w(n, 0, 8'hFF);
      for (int s = 1; s < M; s++) set_w(n, s, 8'h80);
    end
    u_bit = 1;
    measure(ones);
    for (int n = 0; n < N; n++) begin checks++; if (ones[n] < 9000) begin failures++; $display("u=1 neuron %0d: %0d", n, ones[n]); end end
    u_bit = 0;
    measure(ones);
    for (int n = 0; n < N; n++) begin checks++; if (ones[n] > 1000) begin failures++; $display("u=0 neuron %0d: %0d", n, ones[n]); end end
    // Wiring
    for (int n = 0; n < N; n++) begin
      set_w(n, 0, 8'h80);
      set_w(n, 1, 8'hFF);
    end
    for (int j = 0; j < N; j++) begin
      fb_bits = '0;
      fb_bits[j] = 1'b1;
      measure(ones);
      for (int n = 0; n < N; n++) begin
        checks++;
        if ((src_ref(n, 0) == j) ? (ones[n] < 8000) : (ones[n] > 2000)) begin
          failures++;
          $display("wiring j=%0d neuron %0d ones %0d src %0d", j, n, ones[n], src_ref(n, 0));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
