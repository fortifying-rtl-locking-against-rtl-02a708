// tb_locked_design: self-checking testbench for the locked example design.
//
// Phase 1 (correct key {k_b=1, k_o=0, k_c=8'hE9}): random inputs every cycle,
// scan off; checks that two edges after sampling, c1 = a + 8'hE9,
// c2 = a + b, c3 = (a > b), i.e. the original, unlocked behaviour with the
// same two-edge latency. Phase 2: random wrong keys, random scan enable and
// scan data; the cell vector and outputs are compared each cycle with a
// reference model of the locked expressions and the mux-D scan cells.
module tb_locked_design;
  localparam int unsigned DATA_W  = 8;
  localparam int unsigned KEY_W   = DATA_W + 2;
  localparam int unsigned N_CELLS = 4 * DATA_W + 1;
  localparam logic [KEY_W-1:0] GOOD_KEY = {1'b1, 1'b0, 8'b11101001};

  logic clk = 1'b0;
  logic chip_rst, se;
  logic [DATA_W-1:0] a, b, c1, c2;
  logic c3;
  logic [KEY_W-1:0] key;
  logic [N_CELLS-1:0] scan_si, cells;
  int checks = 0, failures = 0;
  int n_scan = 0, n_wrong_out = 0;

  locked_design dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N_CELLS-1:0] rnd_cells();
    logic [63:0] v = {$urandom, $urandom};
    return v[N_CELLS-1:0];
  endfunction

  // Reference model of the state {c3, c2, c1, b, a}.
  logic [DATA_W-1:0] m_a, m_b, m_c1, m_c2;
  logic m_c3;

  logic [DATA_W-1:0] hist_a[$], hist_b[$];

  initial begin
    chip_rst = 1'b1; se = 1'b0; a = '0; b = '0; key = GOOD_KEY; scan_si = '0;
    repeat (2) @(negedge clk);
    chip_rst = 1'b0;
    checks++;
    if (cells !== '0) begin failures++; $display("FAIL reset"); end

    // Phase 1: original behaviour and latency with the correct key.
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (hist_a.size() == 2) begin
        logic [DATA_W-1:0] pa, pb;
        pa = hist_a.pop_front();
        pb = hist_b.pop_front();
        checks++;
        if (c1 !== DATA_W'(pa + 8'hE9) || c2 !== DATA_W'(pa + pb) || c3 !== (pa > pb)) begin
          failures++;
          $display("FAIL functional a=%0d b=%0d c1=%0d c2=%0d c3=%b", pa, pb, c1, c2, c3);
        end
      end
      a = DATA_W'($urandom);
      b = DATA_W'($urandom);
      hist_a.push_back(a);
      hist_b.push_back(b);
    end

    // Phase 2: wrong keys and scan, against the model.
    {m_c3, m_c2, m_c1, m_b, m_a} = cells;
    for (int n = 0; n < 5000; n++) begin
      logic [DATA_W-1:0] na, nb, nc1, nc2;
      logic nc3;
      logic [DATA_W-1:0] kc;
      logic ko, kb;
      @(negedge clk);
      a = DATA_W'($urandom);
      b = DATA_W'($urandom);
      do key = KEY_W'($urandom); while (key == GOOD_KEY);
      se = ($urandom_range(0, 99) < 30);
      scan_si = rnd_cells();
      {kb, ko, kc} = key;
      if (se) begin
        {nc3, nc2, nc1, nb, na} = scan_si;
        n_scan++;
      end else begin
        na = a; nb = b;
        nc1 = m_a + kc;
        nc2 = ko ? DATA_W'(m_a - m_b) : DATA_W'(m_a + m_b);
        nc3 = (m_a <= m_b) ^ kb;
        if (nc1 !== DATA_W'(m_a + 8'hE9) || nc2 !== DATA_W'(m_a + m_b) || nc3 !== (m_a > m_b))
          n_wrong_out++;
      end
      @(posedge clk);
      {m_c3, m_c2, m_c1, m_b, m_a} = {nc3, nc2, nc1, nb, na};
      #1;
      checks++;
      if (cells !== {m_c3, m_c2, m_c1, m_b, m_a} || c1 !== m_c1 || c2 !== m_c2 || c3 !== m_c3) begin
        failures++;
        $display("FAIL %0t: cells=%h expected %h", $time, cells, {m_c3, m_c2, m_c1, m_b, m_a});
      end
    end
    // Both mechanisms must have been exercised; wrong keys must corrupt outputs.
    checks++;
    if (n_scan == 0 || n_wrong_out == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
