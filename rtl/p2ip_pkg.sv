// p2ip_pkg: types, identifiers and constants shared by every block of the
// programmable pipeline image processor.
//
// The configuration tree carries one byte per configuration clock as a
// cfg_word_t: the P2IP-CD decodes the two header bytes (PE ID | module ID,
// operator ID | register size) and tags every payload byte with its full
// address. PE, module and operator numbers follow the configuration tree
// drawing of the design (PP=1, MC=2, SP=3, RI=4; ALU=1, Thr=2; MB crossbar=1,
// NE=2, delay=3; 2DC=1; module crossbar=1, RGB crossbar=2). PE ID 0 addresses
// the global registers held in the P2IP-CD; that number, the register layouts
// other than the threshold register and all kernel encodings are this
// design's own choice.
package p2ip_pkg;

  typedef logic [7:0] pix_t;

  // Largest frame line / frame height (12-bit coordinates, lines up to 4095).
  localparam int unsigned COORD_W = 12;
  typedef logic [COORD_W-1:0] coord_t;

  // Window delivered by the neighborhood extractor: 5 rows x 9 columns,
  // centre pixel at [2][4], row 0 on top, column 0 on the left.
  localparam int unsigned WIN_ROWS = 5;
  localparam int unsigned WIN_COLS = 9;
  typedef pix_t [WIN_ROWS-1:0][WIN_COLS-1:0] window_t;

  // Logic "1" produced by boolean operators on the 8-bit datapath.
  localparam pix_t PIX_TRUE = 8'hFF;

  // ---------------------------------------------------------------- config
  typedef struct packed {
    logic       valid;
    logic [4:0] pe_id;
    logic [2:0] mod_id;
    logic [4:0] op_id;
    logic [2:0] idx;    // byte number inside the operator register
    logic [7:0] data;
  } cfg_word_t;

  localparam logic [2:0] MOD_GLOBAL = 3'd0;
  localparam logic [2:0] MOD_PP     = 3'd1;
  localparam logic [2:0] MOD_MC     = 3'd2;
  localparam logic [2:0] MOD_SP     = 3'd3;
  localparam logic [2:0] MOD_RI     = 3'd4;

  localparam logic [4:0] OP_ALU     = 5'd1;  // PP
  localparam logic [4:0] OP_THR     = 5'd2;  // PP
  localparam logic [4:0] OP_MBX     = 5'd1;  // MC: MB crossbar (+ mirror)
  localparam logic [4:0] OP_NE      = 5'd2;  // MC
  localparam logic [4:0] OP_DLY     = 5'd3;  // MC
  localparam logic [4:0] OP_C2D     = 5'd1;  // SP
  localparam logic [4:0] OP_C2D_K0  = 5'd2;  // SP: downloaded kernel, coefficients 0..7
  localparam logic [4:0] OP_C2D_K1  = 5'd3;  //     coefficients 8..15
  localparam logic [4:0] OP_C2D_K2  = 5'd4;  //     coefficients 16..23
  localparam logic [4:0] OP_C2D_K3  = 5'd5;  //     coefficient 24, right shift
  localparam logic [4:0] OP_MXB     = 5'd1;  // RI: module crossbar
  localparam logic [4:0] OP_RGBX    = 5'd2;  // RI: RGB crossbar
  localparam logic [4:0] OP_G_WIDTH = 5'd1;  // global
  localparam logic [4:0] OP_G_HEIGHT= 5'd2;
  localparam logic [4:0] OP_G_LAT   = 5'd3;
  localparam logic [4:0] OP_G_OMODE = 5'd4;

  // ------------------------------------------------------- memory blocks
  localparam int unsigned MB_AW = 12;        // 4096 x 8 bit per MB
  typedef struct packed {
    logic             we;
    logic [MB_AW-1:0] waddr;
    logic [MB_AW-1:0] raddr;
    pix_t             wdata;
  } mb_req_t;

  typedef enum logic [1:0] {MB_TO_NE = 2'd0, MB_TO_MIR = 2'd1, MB_TO_DLY = 2'd2} mb_owner_e;

  // ------------------------------------------------------------------ ALU
  typedef enum logic [3:0] {
    ALU_PASS = 4'd0, ALU_MUL = 4'd1, ALU_SQR = 4'd2, ALU_SHL = 4'd3,
    ALU_SHR  = 4'd4, ALU_ADD = 4'd5, ALU_SUB = 4'd6, ALU_AND = 4'd7,
    ALU_GT   = 4'd8, ALU_LT  = 4'd9
  } alu_op_e;

  // ---------------------------------------------------------- threshold
  typedef enum logic [1:0] {THR_OFF = 2'd0, THR_BYPASS = 2'd1, THR_NORMAL = 2'd2, THR_HYST = 2'd3} thr_mode_e;

  // ----------------------------------------------------------- 2DC kernels
  // Kernel numbers of the coefficient ROM; 0 selects the downloaded kernel.
  localparam logic [2:0] K_USER = 3'd0, K_IDENT = 3'd1, K_LAPL = 3'd2, K_SOBH = 3'd3,
                         K_SOBV = 3'd4, K_GAUSS5 = 3'd5, K_FDH = 3'd6, K_FDV = 3'd7;

  typedef logic signed [7:0] coef_t;
  typedef coef_t [4:0][4:0] kernel_t;        // [row][col], centre [2][2]

  // 2DC output formats
  localparam logic [1:0] FMT_CLAMP = 2'd0, FMT_ABS = 2'd1, FMT_SIGNED = 2'd2;

  function automatic kernel_t kernel_rom(input logic [2:0] id);
    kernel_t k;
    k = '0;
    case (id)
      K_IDENT: k[2][2] = 8'sd1;
      K_LAPL: begin
        for (int r = 1; r <= 3; r++) for (int c = 1; c <= 3; c++) k[r][c] = -8'sd1;
        k[2][2] = 8'sd8;
      end
      K_SOBH: begin
        k[1][1] = -8'sd1; k[1][3] = 8'sd1;
        k[2][1] = -8'sd2; k[2][3] = 8'sd2;
        k[3][1] = -8'sd1; k[3][3] = 8'sd1;
      end
      K_SOBV: begin
        k[1][1] = -8'sd1; k[1][2] = -8'sd2; k[1][3] = -8'sd1;
        k[3][1] =  8'sd1; k[3][2] =  8'sd2; k[3][3] =  8'sd1;
      end
      K_GAUSS5: begin
        // 5x5 Gaussian, weights 1 4 7 4 1 / 4 16 26 16 4 / 7 26 41 26 7 (sum 273)
        automatic int g[5][5] = '{'{1,4,7,4,1}, '{4,16,26,16,4}, '{7,26,41,26,7},
                                  '{4,16,26,16,4}, '{1,4,7,4,1}};
        for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++) k[r][c] = coef_t'(g[r][c]);
      end
      K_FDH: begin k[2][1] = -8'sd1; k[2][3] = 8'sd1; end
      K_FDV: begin k[1][2] = -8'sd1; k[3][2] = 8'sd1; end
      default: ;
    endcase
    return k;
  endfunction

  // Normalisation applied to the kernel sum: (sum * mul) >>> shift.
  function automatic logic [7:0] kernel_norm_mul(input logic [2:0] id);
    return (id == K_GAUSS5) ? 8'd240 : 8'd1;  // 240/65536 ~ 1/273
  endfunction
  function automatic logic [4:0] kernel_norm_shift(input logic [2:0] id);
    case (id)
      K_LAPL:   return 5'd4;   // 1/16
      K_SOBH, K_SOBV: return 5'd3; // 1/8
      K_GAUSS5: return 5'd16;
      default:  return 5'd0;
    endcase
  endfunction
  function automatic logic kernel_is_5x5(input logic [2:0] id);
    return id == K_GAUSS5;
  endfunction

  function automatic pix_t sat_u8(input logic signed [31:0] v);
    if (v < 0) return 8'd0;
    if (v > 255) return 8'd255;
    return v[7:0];
  endfunction

endpackage
