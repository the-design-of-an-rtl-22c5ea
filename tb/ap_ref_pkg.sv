// Reference model of the array processor for the testbenches.
//
// ApModel keeps an independent copy of the machine state (accumulators, module memories,
// link elements, isolation masks, edge counters, in-out register) and executes orders
// with the same meaning the RTL gives them, written as plain loops over the array. It
// also reports how many extra clocks an EXP order needs (one per step in which some
// accumulator still changed), so testbenches can check order timing.
package ap_ref_pkg;
  import ap_pkg::*;

  class ApModel;
    int n;
    int mem_bits;
    bit ac[][];
    bit mem[][][];
    bit lh[][], lv[][], lpd[][], lnd[][];
    bit row_en[], col_en[];
    int rcnt[], ccnt[];
    int io;
    int last_exp_steps;

    function new(int n_, int mem_bits_);
      n = n_; mem_bits = mem_bits_;
      ac = new[n]; mem = new[n]; lh = new[n]; lv = new[n]; lpd = new[n]; lnd = new[n];
      for (int r = 0; r < n; r++) begin
        ac[r] = new[n]; mem[r] = new[n]; lh[r] = new[n]; lv[r] = new[n];
        lpd[r] = new[n]; lnd[r] = new[n];
        for (int c = 0; c < n; c++) mem[r][c] = new[mem_bits];
      end
      row_en = new[n]; col_en = new[n]; rcnt = new[n]; ccnt = new[n];
      foreach (row_en[i]) begin row_en[i] = 1; col_en[i] = 1; end
      io = 0;
    endfunction

    function bit at(int r, int c);
      if (r < 0 || r >= n || c < 0 || c >= n) return 0;
      return ac[r][c];
    endfunction

    function bit en(int r, int c);
      return row_en[r] & col_en[c];
    endfunction

    // One parallel EXP step; returns 1 if any accumulator changed.
    function bit exp_step(link_e kind);
      bit nx[][];
      bit any;
      nx = new[n];
      any = 0;
      for (int r = 0; r < n; r++) begin
        nx[r] = new[n];
        for (int c = 0; c < n; c++) begin
          bit e;
          e = 0;
          case (kind)
            LK_H: begin
              if (c < n - 1) e |= lh[r][c] & ac[r][c+1];
              if (c > 0)     e |= lh[r][c-1] & ac[r][c-1];
            end
            LK_V: begin
              if (r < n - 1) e |= lv[r][c] & ac[r+1][c];
              if (r > 0)     e |= lv[r-1][c] & ac[r-1][c];
            end
            LK_PD: begin
              if (r > 0 && c < n - 1)     e |= lpd[r][c] & ac[r-1][c+1];
              if (r < n - 1 && c > 0)     e |= lpd[r+1][c-1] & ac[r+1][c-1];
            end
            default: begin
              if (r < n - 1 && c < n - 1) e |= lnd[r][c] & ac[r+1][c+1];
              if (r > 0 && c > 0)         e |= lnd[r-1][c-1] & ac[r-1][c-1];
            end
          endcase
          nx[r][c] = ac[r][c];
          if (en(r, c) && e && !ac[r][c]) begin nx[r][c] = 1; any = 1; end
        end
      end
      ac = nx;
      return any;
    endfunction

    function void exec(order_t o, logic [31:0] data);
      bit nx[][];
      int logn;
      logn = $clog2(n);
      last_exp_steps = 0;
      case (o.op)
        OP_ADD, OP_MPY, OP_COM: begin
          nx = new[n];
          for (int r = 0; r < n; r++) begin
            nx[r] = new[n];
            for (int c = 0; c < n; c++) begin
              bit opnd;
              case (o.src)
                SRC_UP:    opnd = at(r - 1, c);
                SRC_DOWN:  opnd = at(r + 1, c);
                SRC_LEFT:  opnd = at(r, c - 1);
                SRC_RIGHT: opnd = at(r, c + 1);
                default:   opnd = mem[r][c][o.addr];
              endcase
              nx[r][c] = ac[r][c];
              if (en(r, c)) begin
                if (o.op == OP_ADD) nx[r][c] = ac[r][c] | opnd;
                else if (o.op == OP_MPY) nx[r][c] = ac[r][c] & opnd;
                else nx[r][c] = !ac[r][c];
              end
            end
          end
          ac = nx;
        end
        OP_STO: begin
          for (int r = 0; r < n; r++)
            for (int c = 0; c < n; c++)
              if (en(r, c)) mem[r][c][o.addr] = ac[r][c];
        end
        OP_SHR, OP_SRA: begin
          bit sra;
          sra = (o.op == OP_SRA);
          if (o.dir == DIR_RIGHT) for (int r = 0; r < n; r++) rcnt[r] += ac[r][n-1];
          if (o.dir == DIR_UP)    for (int c = 0; c < n; c++) ccnt[c] += ac[0][c];
          nx = new[n];
          for (int r = 0; r < n; r++) begin
            nx[r] = new[n];
            for (int c = 0; c < n; c++) begin
              bit s;
              case (o.dir)
                DIR_RIGHT: s = (c > 0) ? ac[r][c-1] : (sra ? ac[r][n-1] : data[r]);
                DIR_LEFT:  s = (c < n - 1) ? ac[r][c+1] : (sra ? ac[r][0] : 0);
                DIR_UP:    s = (r < n - 1) ? ac[r+1][c] : (sra ? ac[0][c] : 0);
                default:   s = (r > 0) ? ac[r-1][c] : (sra ? ac[n-1][c] : 0);
              endcase
              nx[r][c] = en(r, c) ? s : ac[r][c];
            end
          end
          ac = nx;
        end
        OP_LNK: begin
          for (int r = 0; r < n; r++)
            for (int c = 0; c < n; c++) begin
              if (c < n - 1 && en(r, c) && en(r, c + 1)) lh[r][c] = ac[r][c] & ac[r][c+1];
              if (r < n - 1 && en(r, c) && en(r + 1, c)) lv[r][c] = ac[r][c] & ac[r+1][c];
              if (r > 0 && c < n - 1 && row_en[r] && row_en[r-1] && col_en[c] && col_en[c+1])
                lpd[r][c] = ac[r][c] & ac[r-1][c+1];
              if (r < n - 1 && c < n - 1 && row_en[r] && row_en[r+1] && col_en[c] && col_en[c+1])
                lnd[r][c] = ac[r][c] & ac[r+1][c+1];
            end
        end
        OP_EXP: begin
          while (exp_step(o.kind)) last_exp_steps++;
        end
        OP_CLC: begin
          foreach (rcnt[i]) begin rcnt[i] = 0; ccnt[i] = 0; end
        end
        OP_RDC: begin
          int idx;
          idx = int'(data) & (n - 1);
          io = data[logn] ? ccnt[idx] : rcnt[idx];
        end
        OP_ISR: foreach (row_en[i]) row_en[i] = data[i];
        OP_ISC: foreach (col_en[i]) col_en[i] = data[i];
        default: ;
      endcase
    endfunction
  endclass
endpackage
