// tb_istg_bench_unit: an ISTG sized like one benchmark controller, with a
// generated table, and a self-check of it.
//
// I_W primary inputs, S_W state bits and N rows. Row first vectors are made
// distinct by construction: key index k is mapped to k*ODD + SEED modulo
// 2^(I_W+S_W), a bijection. With SEL_W = 1 rows come in pairs that share a
// first vector and differ in t_sel, the case t_sel exists for. The unit
// applies every row's first vector and NPROBE random inputs, compares with a
// search of the same table, and reports its counts on its outputs once done.
module tb_istg_bench_unit #(
  parameter int unsigned I_W   = 7,
  parameter int unsigned S_W   = 4,
  parameter int unsigned SEL_W = 1,
  parameter bit          PAIRS = 1'b0,
  parameter int unsigned N     = 2,
  parameter int unsigned SEED  = 17,
  parameter int unsigned NPROBE = 200
) (
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int unsigned KW = I_W + S_W;

  typedef logic [N-1:0][KW-1:0]    key_tab_t;
  typedef logic [N-1:0][SEL_W-1:0] sel_tab_t;
  typedef logic [N-1:0][S_W-1:0]   s_tab_t;

  function automatic key_tab_t gen_keys();
    key_tab_t t;
    for (int unsigned r = 0; r < N; r++) begin
      int unsigned k;
      k    = PAIRS ? r / 2 : r;
      t[r] = KW'(k * 32'd2654435761 + SEED);
    end
    return t;
  endfunction

  function automatic sel_tab_t gen_sel();
    sel_tab_t t;
    for (int unsigned r = 0; r < N; r++) t[r] = PAIRS ? SEL_W'(r % 2) : '0;
    return t;
  endfunction

  function automatic s_tab_t gen_s2();
    s_tab_t t;
    for (int unsigned r = 0; r < N; r++) t[r] = S_W'(r * 32'd40503 + SEED * 7 + 1);
    return t;
  endfunction

  localparam key_tab_t KEYS = gen_keys();
  localparam sel_tab_t SELS = gen_sel();
  localparam s_tab_t   S2S  = gen_s2();

  function automatic logic [N-1:0][I_W-1:0] i1_of(key_tab_t k);
    for (int unsigned r = 0; r < N; r++) i1_of[r] = k[r][KW-1 -: I_W];
  endfunction
  function automatic s_tab_t s1_of(key_tab_t k);
    for (int unsigned r = 0; r < N; r++) s1_of[r] = k[r][S_W-1:0];
  endfunction

  logic [I_W-1:0]   pi;
  logic [S_W-1:0]   sr, s2;
  logic [SEL_W-1:0] t_sel;
  logic             hit;

  istg #(
    .I_W(I_W), .S_W(S_W), .SEL_W(SEL_W), .N(N),
    .T_I1(i1_of(KEYS)), .T_S1(s1_of(KEYS)), .T_SEL(SELS), .T_S2(S2S),
    .NO_MATCH_S2('0)
  ) dut (.pi, .sr, .t_sel, .s2, .hit);

  task automatic probe(input logic [KW-1:0] key, input logic [SEL_W-1:0] sel);
    logic [S_W-1:0] e;
    logic           h;
    {pi, sr} = key;
    t_sel    = sel;
    #1;
    e = '0; h = 1'b0;
    for (int unsigned r = 0; r < N; r++)
      if (!h && KEYS[r] == key && SELS[r] == sel) begin e = S2S[r]; h = 1'b1; end
    checks++;
    if (s2 !== e || hit !== h) begin
      failures++;
      $display("FAIL %m: key=%h sel=%0d -> s2=%h hit=%b, expected %h %b", key, sel, s2, hit, e, h);
    end
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    #1;
    for (int unsigned r = 0; r < N; r++) probe(KEYS[r], SELS[r]);
    for (int unsigned i = 0; i < NPROBE; i++)
      probe(KW'({$urandom, $urandom}), SEL_W'($urandom));
    done = 1'b1;
  end

endmodule
